// End-to-end testbench of sols_codec: the coded line from the transmit side
// is looped back into the receive side through a 1 ns wire, and the receive
// clock is the inverse of the transmit clock, so it rises in the middle of
// each bit. Each bit lasts one 10 ns cycle and starts at a rising edge of
// tx_clk (time t). At t+1 the testbench presents the new bit and its mode
// (tx_clr_n follows the mode: 1 for FM0, 0 for Manchester) and sets rx_mode
// to the mode of the previous bit; at t+4, just before the next rising edge
// of rx_clk, rx_decoded must equal the previous bit. This also fixes the
// latency: a bit is decoded one and a half cycles after it is presented, and
// one bit is decoded per cycle.
//
// The sequence starts with 0,1,1,0,1 in FM0 and then in Manchester, then
// sends random bits with random mode switches. Counted, and each required
// at least once: FM0 zeros (mid-bit transition) and ones, Manchester zeros
// and ones, switches FM0 -> Manchester and Manchester -> FM0. A watchdog
// ends a hung run.
module tb_sols_codec;
  import sols_pkg::*;

  localparam int NBITS = 20000;
  localparam logic [4:0] PAT = 5'b10110;  // sent LSB first: 0,1,1,0,1

  logic       tx_clk;
  logic       tx_clr_n;
  code_mode_e tx_mode;
  logic       tx_x;
  logic       tx_code;
  logic       rx_clk;
  logic       rx_rst;
  code_mode_e rx_mode;
  logic       rx_data;
  logic       rx_decoded;

  int checks = 0;
  int failures = 0;
  int n_fm0_zero = 0;
  int n_fm0_one = 0;
  int n_man_zero = 0;
  int n_man_one = 0;
  int n_to_man = 0;
  int n_to_fm0 = 0;

  initial begin
    tx_clk = 1'b0;
    forever #5 tx_clk = ~tx_clk;
  end
  assign rx_clk = ~tx_clk;
  assign #1 rx_data = tx_code;

  sols_codec dut (
    .tx_clk, .tx_clr_n, .tx_mode, .tx_x, .tx_code,
    .rx_clk, .rx_rst, .rx_mode, .rx_data, .rx_decoded
  );

  initial begin : watchdog
    #((NBITS + 100) * 10);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic       prev_bit;
    code_mode_e prev_mode;
    logic       b;
    code_mode_e m;

    tx_mode = MODE_FM0; tx_clr_n = 1'b0; tx_x = 1'b0;
    rx_rst = 1'b1; rx_mode = MODE_FM0;
    repeat (2) @(posedge tx_clk);
    #1;
    tx_clr_n = 1'b1; rx_rst = 1'b0;
    m = MODE_FM0;

    for (int k = 0; k <= NBITS; k++) begin
      if (k < NBITS) begin
        if (k < 5)       begin b = PAT[k];     m = MODE_FM0; end
        else if (k < 10) begin b = PAT[k - 5]; m = MODE_MANCHESTER; end
        else begin
          b = 1'($urandom);
          if ($urandom_range(0, 15) == 0) m = code_mode_e'(~m);
        end
        tx_x = b; tx_mode = m; tx_clr_n = (m == MODE_FM0);
      end
      if (k > 0) begin
        rx_mode = prev_mode;
        #3;
        checks++;
        if (rx_decoded !== prev_bit) begin
          failures++;
          if (failures < 10)
            $display("FAIL bit %0d (%s): sent %0b decoded %0b", k - 1,
                     prev_mode.name(), prev_bit, rx_decoded);
        end
        case ({prev_mode == MODE_MANCHESTER, prev_bit})
          2'b00: n_fm0_zero++;
          2'b01: n_fm0_one++;
          2'b10: n_man_zero++;
          2'b11: n_man_one++;
        endcase
        if (k < NBITS && m != prev_mode) begin
          if (m == MODE_MANCHESTER) n_to_man++;
          else                      n_to_fm0++;
        end
      end
      prev_bit = b;
      prev_mode = m;
      @(posedge tx_clk);
      #1;
    end

    $display("FM0 zeros=%0d ones=%0d  Manchester zeros=%0d ones=%0d  switches to Manchester=%0d to FM0=%0d",
             n_fm0_zero, n_fm0_one, n_man_zero, n_man_one, n_to_man, n_to_fm0);
    checks++;
    if (n_fm0_zero == 0) begin failures++; $display("FAIL no FM0 zero decoded"); end
    checks++;
    if (n_fm0_one == 0) begin failures++; $display("FAIL no FM0 one decoded"); end
    checks++;
    if (n_man_zero == 0) begin failures++; $display("FAIL no Manchester zero decoded"); end
    checks++;
    if (n_man_one == 0) begin failures++; $display("FAIL no Manchester one decoded"); end
    checks++;
    if (n_to_man == 0) begin failures++; $display("FAIL no switch to Manchester"); end
    checks++;
    if (n_to_fm0 == 0) begin failures++; $display("FAIL no switch to FM0"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
