// tb_label_mem: stores random labels at random wire IDs, reads them back,
// checks the read (4 cycles) and write (3 cycles) latencies and that two
// wire IDs SLOTS apart land in the same slot (direct mapping).
module tb_label_mem;
  import gc_pkg::*;
  localparam int unsigned SLOTS = 8192;

  logic clk = 0, rst_n = 0, req = 0, we = 0, busy, done;
  wire_id_t id;
  label_t wdata, rdata;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  label_mem dut (.*);

  task automatic access(input logic w, input wire_id_t i, input label_t d, output label_t q);
    int cyc;
    @(negedge clk);
    while (busy) @(negedge clk);
    req = 1; we = w; id = i; wdata = d;
    @(negedge clk);
    req = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    q = rdata;
    checks++;
    if (cyc != (w ? 3 : 4)) begin
      failures++; $display("FAIL latency %0d for %s", cyc, w ? "write" : "read");
    end
  endtask

  initial begin
    wire_id_t ids [32];
    label_t   vals [32];
    label_t   q;
    id = '0; wdata = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 32; i++) begin
      ids[i]  = wire_id_t'((i * 397 + 11) % SLOTS);   // distinct slots
      vals[i] = {$urandom, $urandom, $urandom, $urandom};
      access(1, ids[i], vals[i], q);
    end
    for (int i = 31; i >= 0; i--) begin
      access(0, ids[i], '0, q);
      checks++;
      if (q !== vals[i]) begin failures++; $display("FAIL id %0d: %h exp %h", ids[i], q, vals[i]); end
    end
    // direct mapping: ID + SLOTS overwrites the slot of ID
    access(1, wire_id_t'(ids[4] + SLOTS), ~vals[4], q);
    access(0, ids[4], '0, q);
    checks++;
    if (q !== ~vals[4]) begin failures++; $display("FAIL aliasing"); end
    // neighbouring slot untouched
    access(0, ids[5], '0, q);
    checks++;
    if (q !== vals[5]) begin failures++; $display("FAIL neighbour"); end
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
