// tb_gc_coproc_top: end-to-end run of the coprocessor at its default
// parameters, with the testbench as the host. Over SPI it loads garbled
// input labels (SETADDR, WRITE), streams a random circuit of XOR, BUF
// and AND gates garbled by the reference garbler, and reads every wire
// label back (READ), comparing it with the garbler's prediction and
// decoding the output bits. Wire IDs start just below the number of
// label slots so that the circuit wraps around the direct-mapped store.
// It counts how often each mechanism happened (free XOR, buffer, AND
// with each point-and-permute row including the reduced row 0, slot
// wrap-around, hash finished before the first ciphertext was complete,
// idle time on the link, new chip-select frames) and fails if one never
// did. The performance counters are checked against the gate counts, and
// their per-gate cycle averages against the expected cost of a gate with
// SCK at 5/3 of the core clock, near the link's limit.
module tb_gc_coproc_top;
  import gc_pkg::*;
  import gc_model_pkg::*;

  localparam int N_IN = 16, N_GATES = 120, SLOTS = 8192;
  localparam int BASE = SLOTS - 40;   // first wire ID
  localparam int HALF = 3;            // SCK half period; core clock period 10 (SCK = 5/3 core)

  logic clk = 0, rst_n = 1;
  logic spi_sck = 0, spi_cs_n = 0, spi_mosi = 0, spi_miso, perf_clear = 0, overrun;
  logic [31:0] perf_idle_cycles, perf_and_count, perf_and_cycles, perf_xor_count, perf_xor_cycles,
               perf_buf_count, perf_last_cycles;
  wire_id_t head;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_xor = 0, n_buf = 0, n_and = 0, rows [4], n_wrap = 0, n_frames = 0, n_read = 0, n_write = 0;
  int n_hash_early = 0, n_hash_late = 0;

  always #5 clk = !clk;

  gc_coproc_top dut (.*);

  // hash completion relative to the first ciphertext of each AND gate
  logic hash_done_seen;
  always @(posedge clk) begin
    if (dut.u_dec.ev_op) hash_done_seen <= 1'b0;
    if (dut.u_aes.done)  hash_done_seen <= 1'b1;
    if (dut.u_dec.ev_ct && dut.u_dec.ct_idx == 2'd1) begin
      if (hash_done_seen || dut.u_aes.done) n_hash_early++;
      else                                   n_hash_late++;
    end
  end

  task automatic xfer(input logic [7:0] d, output logic [7:0] q);
    for (int i = 7; i >= 0; i--) begin
      spi_mosi = d[i];
      #HALF spi_sck = 1;
      q[i] = spi_miso;
      #HALF spi_sck = 0;
    end
  endtask
  task automatic tx(input logic [7:0] d);
    logic [7:0] q;
    xfer(d, q);
  endtask
  task automatic tx_id(input int id);
    wire_id_t v;
    v = wire_id_t'(id);
    if (id >= SLOTS) n_wrap++;
    for (int i = ID_BYTES - 1; i >= 0; i--) tx(v[8*i +: 8]);
  endtask
  task automatic tx_label(input label_t l);
    for (int i = LABEL_B - 1; i >= 0; i--) tx(l[8*i +: 8]);
  endtask
  task automatic begin_frame();
    spi_cs_n = 0; #HALF;
    n_frames++;
  endtask
  task automatic end_frame(input int gap);
    #HALF spi_cs_n = 1;
    #(gap);
  endtask

  label_t delta, c0 [N_IN + N_GATES];
  logic   val [N_IN + N_GATES];

  function automatic label_t active(input int w);
    return c0[w] ^ (val[w] ? delta : '0);
  endfunction

  initial begin
    and_gate_t g;
    label_t la, lb, got;
    logic [7:0] q;
    int a, b, t;
    delta = {$urandom, $urandom, $urandom, $urandom} | 128'h1;
    // reset and chip select edges clear the SCK-domain registers, which
    // see no SCK edge during reset
    #1 rst_n = 0;
    #1 spi_cs_n = 1;
    #23 rst_n = 1;
    #100;
    // garbled inputs
    begin_frame(); tx(OP_SETADDR); tx_id(BASE); end_frame(200);
    begin_frame();
    for (int w = 0; w < N_IN; w++) begin
      c0[w]  = {$urandom, $urandom, $urandom, $urandom};
      val[w] = 1'($urandom);
      tx(OP_WRITE); tx_label(active(w));
      n_write++;
    end
    end_frame(300);
    // gates, a few per frame, idle gaps in between
    for (int w = N_IN; w < N_IN + N_GATES; w++) begin
      if (w % 4 == 0) begin_frame();
      a = $urandom_range(w - 1, (w > 30) ? w - 30 : 0);
      b = $urandom_range(w - 1, (w > 30) ? w - 30 : 0);
      t = $urandom_range(4);
      if (t <= 1) begin
        n_xor++;
        c0[w] = c0[a] ^ c0[b]; val[w] = val[a] ^ val[b];
        tx(OP_XOR); tx_id(BASE + a); tx_id(BASE + b); tx_id(BASE + w);
      end else if (t == 2) begin
        n_buf++;
        c0[w] = c0[a]; val[w] = val[a];
        tx(OP_BUF); tx_id(BASE + a); tx_id(BASE + w);
      end else begin
        n_and++;
        g = garble_and(c0[a], c0[b], delta);
        c0[w] = g.c0; val[w] = val[a] & val[b];
        la = active(a); lb = active(b);
        rows[{la[0], lb[0]}]++;
        tx(OP_AND); tx_id(BASE + a); tx_id(BASE + b);
        for (int r = 1; r < 4; r++) tx_label(g.ct[r]);
        tx_id(BASE + w);
      end
      if (w % 4 == 3 || w == N_IN + N_GATES - 1) end_frame(100 + 10 * $urandom_range(20));
    end
    // read everything back in one frame
    begin_frame(); tx(OP_SETADDR); tx_id(BASE);
    for (int w = 0; w < N_IN + N_GATES; w++) begin
      tx(OP_READ);
      for (int i = 0; i < RD_GAP; i++) tx(8'h00);  // reply turnaround slots
      for (int i = LABEL_B - 1; i >= 0; i--) begin
        xfer(8'h00, q);
        got[8*i +: 8] = q;
      end
      n_read++;
      checks++;
      if (got !== active(w)) begin
        failures++; $display("FAIL wire %0d: %h exp %h", BASE + w, got, active(w));
      end
    end
    end_frame(500);
    // decode the last eight wires as output bits
    for (int w = N_IN + N_GATES - 8; w < N_IN + N_GATES; w++) begin
      checks++;
      if ((active(w) == c0[w]) == val[w]) begin failures++; $display("FAIL decode %0d", w); end
    end
    // performance counters
    checks++;
    if (perf_and_count != 32'(n_and) || perf_xor_count != 32'(n_xor) || perf_buf_count != 32'(n_buf)) begin
      failures++;
      $display("FAIL counters and=%0d xor=%0d buf=%0d", perf_and_count, perf_xor_count, perf_buf_count);
    end
    checks++;
    if (overrun) begin failures++; $display("FAIL overrun"); end
    $display("cycles per gate: AND %0d, XOR %0d; idle cycles %0d",
             perf_and_cycles / perf_and_count, perf_xor_cycles / perf_xor_count, perf_idle_cycles);
    // with SCK at 5/3 of the core clock a byte takes 4.8 core cycles; an
    // AND gate (55 bytes after its opcode byte) should then cost about 250
    // cycles and an XOR gate (7 bytes) about 30, in line with the 247 and
    // 26 measured on the original coprocessor
    checks++;
    if (perf_and_cycles / perf_and_count < 220 || perf_and_cycles / perf_and_count > 280 ||
        perf_xor_cycles / perf_xor_count < 22 || perf_xor_cycles / perf_xor_count > 36) begin
      failures++; $display("FAIL cycles per gate out of range");
    end
    // every mechanism must have happened
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (rows[r] == 0) begin failures++; $display("FAIL pointer row %0d never used", r); end
    end
    $display("mechanisms: xor=%0d buf=%0d and=%0d rows=%0d/%0d/%0d/%0d wrap=%0d frames=%0d write=%0d read=%0d hash_before_ct1=%0d idle=%0d",
             n_xor, n_buf, n_and, rows[0], rows[1], rows[2], rows[3], n_wrap, n_frames, n_write, n_read,
             n_hash_early, perf_idle_cycles);
    checks++;
    if (n_xor == 0 || n_buf == 0 || n_and == 0 || n_wrap == 0 || n_frames < 2 || n_write == 0 ||
        n_read == 0 || n_hash_early == 0 || perf_idle_cycles == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    if (n_hash_late != 0) begin failures++; $display("FAIL hash later than first ciphertext %0d times", n_hash_late); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
