// tb_pp_select: for random labels, hashes and ciphertexts, checks that the
// output label is hash ^ ct[pointer] (hash alone for pointer 0), with the
// hash arriving before, between or after the ciphertexts.
module tb_pp_select;
  import gc_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, ptr_valid = 0, color_a = 0, color_b = 0;
  logic ct_valid = 0, hash_valid = 0, result_valid;
  row_t ct_idx = 0;
  label_t ct = 0, hash = 0, result;
  int checks = 0, failures = 0;
  int rows_seen [4];

  always #5 clk = !clk;

  pp_select dut (.*);

  task automatic one_gate(input int hash_at);
    label_t cts [4], h, exp;
    logic ca, cb;
    ca = 1'($urandom); cb = 1'($urandom);
    h = {$urandom, $urandom, $urandom, $urandom};
    for (int r = 1; r < 4; r++) cts[r] = {$urandom, $urandom, $urandom, $urandom};
    exp = ({ca, cb} == 2'd0) ? h : h ^ cts[{ca, cb}];
    rows_seen[{ca, cb}]++;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    ptr_valid = 1; color_a = ca; color_b = cb; @(negedge clk); ptr_valid = 0;
    for (int r = 1; r <= 4; r++) begin
      if (hash_at == r) begin hash_valid = 1; hash = h; @(negedge clk); hash_valid = 0; hash = '0; end
      if (r < 4) begin
        repeat (2) @(negedge clk);
        ct_valid = 1; ct_idx = row_t'(r); ct = cts[r]; @(negedge clk); ct_valid = 0; ct = '0;
      end
    end
    repeat (2) @(negedge clk);
    checks++;
    if (!result_valid || result !== exp) begin
      failures++; $display("FAIL ptr=%0d hash_at=%0d valid=%b", {ca, cb}, hash_at, result_valid);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) one_gate(1 + (i % 4));
    // a clear drops the result
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    checks++;
    if (result_valid) begin failures++; $display("FAIL clear"); end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (rows_seen[r] == 0) begin failures++; $display("FAIL row %0d never used", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
