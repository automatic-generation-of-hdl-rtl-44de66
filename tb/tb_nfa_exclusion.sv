// Testbench for nfa_exclusion, wired as [^xy]: the class (x|y) is built from
// two nfa_comparator states and an nfa_union fed by the exclusion's sub_en.
// Random activations and symbols (often x or y); `hit` must be 1 exactly
// when the previous cycle's activation was 1 and the symbol is neither x nor
// y, and 0 under reset.
`timescale 1ns/1ps
module tb_nfa_exclusion;
  import regex_nfa_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b1, hit;
  logic sub_en, sub_hit, en_x, en_y, hit_x, hit_y;
  sym_t data = "x";
  int   checks = 0, failures = 0, hits_seen = 0, rejects_seen = 0;
  bit   prev_en;

  nfa_exclusion dut (.clk, .rst_n, .hit, .en, .sub_en, .sub_hit);
  nfa_union u_class (.hit(sub_hit), .en(sub_en),
                     .a_en(en_x), .a_hit(hit_x), .b_en(en_y), .b_hit(hit_y));
  nfa_comparator #(.CHAR("x")) u_x (.clk, .rst_n, .data, .en(en_x), .hit(hit_x));
  nfa_comparator #(.CHAR("y")) u_y (.clk, .rst_n, .data, .en(en_y), .hit(hit_y));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp;
    repeat (3) @(posedge clk);
    @(negedge clk);
    data = "z";
    #1;
    checks++;
    if (hit !== 1'b0) begin failures++; $display("FAIL hit under reset"); end
    rst_n = 1'b1;
    prev_en = en;  // loaded by the first edge after reset
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      case ($urandom_range(3))
        0: data = "x";
        1: data = "y";
        default: data = sym_t'($urandom);
      endcase
      // A new activation is applied before the check: the state must
      // show the previous one, not this one.
      en = 1'($urandom);
      #1;
      exp = prev_en && data != "x" && data != "y";
      checks++;
      if (hit !== exp) begin
        failures++;
        $display("FAIL cycle %0d data=%0h: hit=%0b expected %0b", i, data, hit, exp);
      end
      if (hit) hits_seen++;
      if (prev_en && !exp) rejects_seen++;
      @(posedge clk);
      prev_en = en;
    end
    checks++;
    if (hits_seen < 100 || rejects_seen < 100) begin
      failures++;
      $display("FAIL coverage: %0d hits, %0d rejects", hits_seen, rejects_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
