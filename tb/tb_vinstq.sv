// tb_vinstq: checks the instruction queue: order kept, nothing lost or
// duplicated under random push and pop, full after DEPTH pushes, empty after
// reset.
`timescale 1ns/1ps
module tb_vinstq;
  import viram_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  vinstr_t in_instr, out_instr;
  int checks = 0, failures = 0;
  vinstr_t exp_q [$];
  int sent = 0, got = 0;

  vinstq #(.DEPTH(4)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_instr = '0;
    #3 rst_n = 1;
    @(negedge clk);
    checks++;
    if (out_valid || !in_ready) begin failures++; $display("not empty after reset"); end
    // fill to full
    for (int i = 0; i < 4; i++) begin
      in_valid = 1; in_instr = '0; in_instr.scalar = 64'(sent);
      exp_q.push_back(in_instr); sent++;
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (in_ready) begin failures++; $display("not full after 4 pushes"); end
    // random traffic
    for (int n = 0; n < 2000; n++) begin
      in_valid = ($urandom_range(1) == 1);
      out_ready = ($urandom_range(2) != 0);
      in_instr = '0; in_instr.scalar = 64'(sent); in_instr.base = $urandom();
      #0.5;
      if (out_valid && out_ready) begin
        checks++;
        if (out_instr !== exp_q.pop_front()) begin failures++; $display("wrong order at %0d", got); end
        got++;
      end
      if (in_valid && in_ready) begin exp_q.push_back(in_instr); sent++; end
      @(negedge clk);
    end
    checks++;
    if (got < 500) begin failures++; $display("too little traffic"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
