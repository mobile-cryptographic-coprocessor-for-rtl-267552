// tb_perf_counters: plays instruction start/end/done sequences with known
// gaps and lengths and checks the idle count, per-type counts and cycle
// totals, with ev_end and instr_done arriving in either order, and with
// the next opcode arriving before the previous instruction's done pulse.
module tb_perf_counters;
  import gc_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, ev_op = 0, ev_end = 0, instr_done = 0;
  opcode_e op = OP_NOP;
  logic [31:0] idle_cycles, and_count, and_cycles, xor_count, xor_cycles, buf_count, last_cycles;
  int checks = 0, failures = 0;

  always #5 clk = !clk;

  perf_counters dut (.*);

  // opcode strobe, then end after e cycles and done after d cycles
  // (counted from the strobe); returns the expected instruction length
  task automatic instr(input opcode_e o, input int e, input int d, output int len);
    int last;
    last = (e > d) ? e : d;
    @(negedge clk); ev_op = 1; op = o;
    @(negedge clk); ev_op = 0;
    for (int c = 1; c <= last; c++) begin
      ev_end = (c == e); instr_done = (c == d);
      @(negedge clk);
    end
    ev_end = 0; instr_done = 0;
    len = last;
  endtask

  task automatic check(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    int len, and_sum, xor_sum, idle;
    and_sum = 0; xor_sum = 0; idle = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (7) @(negedge clk);   // before the first instruction: not idle
    instr(OP_XOR, 10, 14, len); xor_sum += len;
    check("last", last_cycles, len);
    repeat (5) @(negedge clk); idle += 5;
    instr(OP_AND, 40, 36, len); and_sum += len;
    repeat (9) @(negedge clk); idle += 9;
    instr(OP_AND, 50, 55, len); and_sum += len;
    instr(OP_BUF, 6, 8, len);
    repeat (3) @(negedge clk); idle += 3;
    instr(OP_XOR, 12, 12, len); xor_sum += len;
    check("last", last_cycles, len);
    instr(OP_WRITE, 17, 20, len);
    @(negedge clk);
    // each instr() call spends one cycle between an end and the next strobe
    idle += 5 + 1;   // one cycle in each of the 5 hand-overs, one at the end
    check("idle", idle_cycles, idle);
    check("and_count", and_count, 2);
    check("and_cycles", and_cycles, and_sum);
    check("xor_count", xor_count, 2);
    check("xor_cycles", xor_cycles, xor_sum);
    check("buf_count", buf_count, 1);
    // overlap: the next opcode arrives 9 cycles after an XOR strobe, after
    // its end but before its done pulse, which comes 2 cycles into the AND
    @(negedge clk); ev_op = 1; op = OP_XOR;
    @(negedge clk); ev_op = 0;
    for (int c = 1; c < 9; c++) begin
      ev_end = (c == 6);
      @(negedge clk);
    end
    ev_end = 0;
    ev_op = 1; op = OP_AND;
    @(negedge clk); ev_op = 0;
    for (int c = 1; c <= 25; c++) begin
      instr_done = (c == 2 || c == 25); ev_end = (c == 20);
      @(negedge clk);
    end
    instr_done = 0; ev_end = 0;
    xor_sum += 9; and_sum += 25;
    check("overlap xor_count", xor_count, 3);
    check("overlap xor_cycles", xor_cycles, xor_sum);
    check("overlap and_count", and_count, 3);
    check("overlap and_cycles", and_cycles, and_sum);
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    check("cleared", idle_cycles | and_count | xor_cycles, 0);
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
