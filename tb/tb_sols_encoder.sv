// Self-checking testbench of sols_encoder.
//
// A 10 ns clock gives one bit per cycle; clk is high for the first half-bit.
// Each bit, x, mode and clr_n (= inverse of mode) are changed 1 ns after the
// rising edge, and the coded line is sampled 3 ns (first half) and 8 ns
// (second half) after it. A reference built from the line-code rules alone
// predicts both halves:
//   FM0:        the level flips at every bit boundary; it flips again in the
//               middle of the bit for a 0 and stays for a 1.
//   Manchester: a 1 is low then high, a 0 is high then low.
// The FM0 boundary rule is also checked directly between consecutive FM0
// bits (after a switch from Manchester, FM0 restarts from a cleared state).
// The two five-bit patterns 0,1,1,0,1 are sent in each code first, then
// random bits with random mode changes. A watchdog ends a hung run.
module tb_sols_encoder;
  import sols_pkg::*;

  localparam int NBITS = 4000;
  localparam logic [4:0] PAT = 5'b10110;  // sent LSB first: 0,1,1,0,1

  logic       clk;
  logic       clr_n;
  code_mode_e mode;
  logic       x;
  logic       code;

  int checks = 0;
  int fm0_bits = 0;
  int man_bits = 0;
  int switches = 0;
  int failures = 0;

  sols_encoder dut (.clk(clk), .clr_n(clr_n), .mode(mode), .x(x), .code(code));

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  task automatic check(input logic got, input logic exp, input string what, input int k);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL bit %0d %s: got %0b expected %0b", k, what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (NBITS + 100) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic lvl;          // line level at the end of the previous bit
    logic prev_second;  // same, as seen on the line (for the FM0 rule check)
    logic first, second;
    logic bit_v;
    code_mode_e m;
    code_mode_e prev_m;
    int cycles_start, cycles_end;

    // clear the flip-flop, then start from a known line level of 0
    mode = MODE_FM0; clr_n = 1'b0; x = 1'b0;
    @(posedge clk); #1;
    lvl = 1'b0; prev_second = 1'b0;
    m = MODE_FM0;
    cycles_start = 0;

    for (int k = 0; k < NBITS; k++) begin
      code_mode_e new_m;
      if (k < 5)       begin new_m = MODE_FM0;        bit_v = PAT[k]; end
      else if (k < 10) begin new_m = MODE_MANCHESTER; bit_v = PAT[k-5]; end
      else begin
        bit_v = 1'($urandom);
        new_m = ($urandom_range(0, 15) == 0) ? code_mode_e'(~m) : m;
      end
      if (new_m != m) switches++;
      prev_m = m;
      m = new_m;

      // drive this bit just after the rising edge that starts it
      mode = m; clr_n = (m == MODE_FM0); x = bit_v;

      if (m == MODE_MANCHESTER) begin
        first = ~bit_v; second = bit_v; lvl = 1'b0; man_bits++;
      end else begin
        first  = ~lvl;
        second = bit_v ? first : ~first;
        lvl    = second;
        fm0_bits++;
      end

      #2;  // 3 ns after the edge: first half
      check(code, first, "first half", k);
      if (m == MODE_FM0 && prev_m == MODE_FM0 && k > 0) begin
        // FM0 rule 3: the line changes at every boundary between FM0 bits
        checks++;
        if (code == prev_second) begin
          failures++;
          if (failures < 10) $display("FAIL bit %0d: no FM0 boundary transition", k);
        end
      end
      #5;  // 8 ns after the edge: second half
      check(code, second, "second half", k);
      prev_second = code;
      @(posedge clk); #1;
      cycles_start++;
    end

    // rate: one bit per clock cycle
    checks++;
    if (cycles_start != NBITS) failures++;
    if (fm0_bits == 0 || man_bits == 0 || switches < 2) begin
      failures++;
      $display("FAIL coverage fm0=%0d manchester=%0d switches=%0d", fm0_bits, man_bits, switches);
    end
    $display("fm0 bits=%0d manchester bits=%0d mode switches=%0d", fm0_bits, man_bits, switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
