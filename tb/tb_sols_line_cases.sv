// Constant-data cases of the codec, run through sols_codec in loop-back.
//
// Four cases, each 32 bits long with the data held constant, the line freshly
// cleared (tx_clr_n low for one cycle) and the receiver reset first:
//   Manchester, x = 0: every bit is high then low (one falling mid-bit edge)
//   Manchester, x = 1: every bit is low then high (one rising mid-bit edge)
//   FM0, x = 0:        the line changes at every half-bit; starting from a
//                      cleared flip-flop it is high in every first half, so
//                      it runs in phase with the clock
//   FM0, x = 1:        the line changes only at bit boundaries, so it is a
//                      square wave at half the clock rate, high in the first
//                      bit after the clear
// In each case the coded line is sampled in the middle of both half-bits and
// the decoded output is compared with x once per bit (1.5 cycles after the
// bit is presented, as in tb_sols_codec). The receive clock is the inverse
// of the transmit clock; the line reaches the receiver 1 ns late.
module tb_sols_line_cases;
  import sols_pkg::*;

  localparam int NBITS = 32;

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

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0b expected %0b", what, got, exp);
    end
  endtask

  // One case: the rising edge of tx_clk has just passed (+1 ns).
  task automatic run_case(input code_mode_e m, input logic xv);
    string tag = $sformatf("%s x=%0b", m.name(), xv);
    logic first, second;
    // clear the encoder flip-flop and reset the receiver for one cycle
    tx_mode = m; rx_mode = m; tx_x = xv;
    tx_clr_n = 1'b0; rx_rst = 1'b1;
    @(posedge tx_clk); #1;
    tx_clr_n = (m == MODE_FM0); rx_rst = 1'b0;
    for (int k = 0; k <= NBITS; k++) begin
      if (m == MODE_MANCHESTER) begin
        first = ~xv; second = xv;
      end else begin
        first  = (k % 2 == 0) || !xv;       // FM0: see the header
        second = xv ? first : ~first;
      end
      #2;
      if (k < NBITS) check(tx_code, first, {tag, " first half"});
      if (k > 0)     check(rx_decoded, xv, {tag, " decoded"});
      #5;
      if (k < NBITS) check(tx_code, second, {tag, " second half"});
      @(posedge tx_clk); #1;
    end
  endtask

  initial begin : watchdog
    #(4 * (NBITS + 4) * 10 + 1000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    tx_mode = MODE_FM0; rx_mode = MODE_FM0; tx_x = 1'b0;
    tx_clr_n = 1'b0; rx_rst = 1'b1;
    @(posedge tx_clk); #1;
    run_case(MODE_MANCHESTER, 1'b0);
    run_case(MODE_MANCHESTER, 1'b1);
    run_case(MODE_FM0, 1'b0);
    run_case(MODE_FM0, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
