// tb_aes_hash: checks aes_hash against the FIPS-197 example vectors and
// against the reference model for random keys and data, and checks that
// each encryption takes exactly 30 cycles (10 rounds of 3).
module tb_aes_hash;
  import gc_pkg::*;
  import aes_ref_pkg::*;

  logic clk = 0, rst_n = 0, start = 0, busy, done;
  label_t key, pt, ct;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  aes_hash dut (.clk, .rst_n, .start, .key, .pt, .busy, .done, .ct);

  task automatic run(input label_t k, input label_t p, input label_t exp);
    int cyc;
    @(negedge clk);
    key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0;
    cyc = 0;  // edges after the one that took start
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (ct !== exp) begin
      failures++;
      $display("FAIL key=%h pt=%h ct=%h exp=%h", k, p, ct, exp);
    end
    checks++;
    if (cyc != 30) begin failures++; $display("FAIL latency %0d, expected 30", cyc); end
  endtask

  initial begin
    label_t k, p;
    key = '0; pt = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // FIPS-197 Appendix C.1 and Appendix B
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
        128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 20; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      run(k, p, encrypt(k, p));
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
