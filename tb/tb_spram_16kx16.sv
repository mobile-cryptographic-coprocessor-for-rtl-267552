// tb_spram_16kx16: writes random words with random nibble masks to random
// addresses, reads them back against a model, and checks that standby
// blocks writes, that dataout holds when idle and that sleep clears it.
module tb_spram_16kx16;
  logic clock = 0;
  logic [13:0] address;
  logic [15:0] datain, dataout;
  logic [3:0]  maskwren;
  logic wren, chipselect, standby, sleep, poweroff;
  int checks = 0, failures = 0;
  logic [15:0] model [int];

  always #5 clock = !clock;

  spram_16kx16 dut (.*);

  task automatic wr(input logic [13:0] a, input logic [15:0] d, input logic [3:0] m);
    @(negedge clock);
    address = a; datain = d; maskwren = m; wren = 1; chipselect = 1;
    @(negedge clock);
    chipselect = 0; wren = 0;
  endtask

  task automatic rd_check(input logic [13:0] a, input logic [15:0] exp);
    @(negedge clock);
    address = a; wren = 0; chipselect = 1;
    @(negedge clock);
    chipselect = 0;
    checks++;
    if (dataout !== exp) begin failures++; $display("FAIL rd %h: %h exp %h", a, dataout, exp); end
  endtask

  initial begin
    logic [13:0] addrs [64];
    logic [15:0] d, old;
    logic [3:0] m;
    chipselect = 0; wren = 0; standby = 0; sleep = 0; poweroff = 1;
    address = 0; datain = 0; maskwren = 4'hF;
    for (int i = 0; i < 64; i++) begin
      addrs[i] = 14'($urandom);
      wr(addrs[i], 16'($urandom), 4'hF);
      model[int'(addrs[i])] = 16'h0;
    end
    // full writes then masked writes
    for (int i = 0; i < 64; i++) begin
      d = 16'($urandom);
      wr(addrs[i], d, 4'hF);
      model[int'(addrs[i])] = d;
    end
    for (int i = 0; i < 64; i++) begin
      d = 16'($urandom); m = 4'($urandom);
      wr(addrs[i], d, m);
      old = model[int'(addrs[i])];
      for (int n = 0; n < 4; n++) if (m[n]) old[4*n +: 4] = d[4*n +: 4];
      model[int'(addrs[i])] = old;
    end
    for (int i = 0; i < 64; i++) rd_check(addrs[i], model[int'(addrs[i])]);
    // dataout holds while chip select is low
    rd_check(addrs[3], model[int'(addrs[3])]);
    repeat (3) @(negedge clock);
    checks++;
    if (dataout !== model[int'(addrs[3])]) begin failures++; $display("FAIL hold"); end
    // standby blocks a write
    standby = 1;
    wr(addrs[5], ~model[int'(addrs[5])], 4'hF);
    standby = 0;
    rd_check(addrs[5], model[int'(addrs[5])]);
    // sleep clears the output
    @(negedge clock); sleep = 1; @(negedge clock); sleep = 0;
    checks++;
    if (dataout !== 16'h0) begin failures++; $display("FAIL sleep"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
