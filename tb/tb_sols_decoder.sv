// Self-checking testbench of sols_decoder.
//
// The testbench builds the coded line itself from the line-code rules (FM0:
// a level change at each bit boundary and one more mid-bit for a 0;
// Manchester: 1 = low then high, 0 = high then low) and drives it into the
// decoder. Bits are 10 ns long and start at t = 10k; the half-bits reach the
// decoder 1 ns late (at 10k+1 and 10k+6), as over a short wire. The decoder
// clock rises in the middle of each bit (10k+5) and falls at its end
// (10k+10). Bit k is compared with the sent bit at 10k+14, just before the
// rising edge that follows its end, which is one and a half cycles after the
// bit started: the decoder delivers one bit per cycle at that latency.
// Also checked: the output during reset, and both codes with random mode
// changes. A watchdog ends a hung run.
module tb_sols_decoder;
  import sols_pkg::*;

  localparam int NBITS = 4000;

  logic       clk;
  logic       rst;
  code_mode_e mode;
  logic       data;
  logic       decoded;

  int checks = 0;
  int failures = 0;
  int fm0_bits = 0;
  int man_bits = 0;
  int switches = 0;

  sols_decoder dut (.clk(clk), .rst(rst), .mode(mode), .data(data), .decoded(decoded));

  initial begin
    clk = 1'b0;
    forever begin
      #5 clk = 1'b1;
      #5 clk = 1'b0;
    end
  end

  task automatic check(input logic got, input logic exp, input string what, input int k);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL bit %0d %s: got %0b expected %0b", k, what, got, exp);
    end
  endtask

  initial begin : watchdog
    #((NBITS + 100) * 10);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic       lvl;
    logic       first, second;
    logic       sent[NBITS];
    code_mode_e sent_mode[NBITS];
    code_mode_e m;

    // reset: both flip-flops at 0, which reads as 1 in either code
    rst = 1'b1; mode = MODE_FM0; data = 1'b0;
    #21;                       // t = 21 = 10*2 + 1
    check(decoded, 1'b1, "FM0 output in reset", -1);
    mode = MODE_MANCHESTER; #1;
    check(decoded, 1'b1, "Manchester output in reset", -1);
    #9;                        // t = 31
    rst = 1'b0;
    lvl = 1'b0;
    m = MODE_FM0;

    // from here, bit k starts at t = 30 + 10k; this process runs at +1 ns
    for (int k = 0; k <= NBITS; k++) begin
      if (k < NBITS) begin
        code_mode_e new_m;
        new_m = ($urandom_range(0, 15) == 0) ? code_mode_e'(~m) : m;
        if (k > 0 && new_m != m) switches++;
        m = new_m;
        sent[k] = 1'($urandom);
        sent_mode[k] = m;
        if (m == MODE_MANCHESTER) begin
          first = ~sent[k]; second = sent[k]; man_bits++;
        end else begin
          first = ~lvl; second = sent[k] ? first : ~first; fm0_bits++;
        end
        lvl = second;
        data = first;
      end
      // the previous bit is read in its own mode
      if (k > 0) begin
        mode = sent_mode[k-1];
        #3;
        check(decoded, sent[k-1], (sent_mode[k-1] == MODE_FM0) ? "FM0" : "Manchester", k-1);
        #2;
      end else begin
        #5;
      end
      if (k < NBITS) data = second;
      #5;
    end

    if (fm0_bits == 0 || man_bits == 0 || switches < 2) begin
      failures++;
      $display("FAIL coverage fm0=%0d manchester=%0d switches=%0d", fm0_bits, man_bits, switches);
    end
    $display("fm0 bits=%0d manchester bits=%0d mode switches=%0d", fm0_bits, man_bits, switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
