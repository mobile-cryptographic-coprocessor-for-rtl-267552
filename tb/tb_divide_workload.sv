// tb_divide_workload: runs an N-bit unsigned integer division (N = 64 by
// default, the size of the benchmark this coprocessor was measured with)
// as a garbled circuit through the whole coprocessor at its default
// parameters, with the testbench as both garbler and host.
//
// The circuit is restoring division built from XOR and AND gates only:
// for each quotient bit, shift the next dividend bit into the partial
// remainder, subtract the divisor with a ripple borrow chain
//   d = r ^ b ^ br,  br' = br ^ ((r ^ b) & (b ^ br)),
// and keep either the difference or the old remainder with
//   r' = d ^ (borrow & (b ^ br)).
// Constants 0 and 1 are two extra garbled inputs. The store holds only
// 8192 labels and is direct mapped, so the host copies a wire with a BUF
// gate to a fresh wire ID whenever it has become too old to be safe and
// will still be needed: at the start of each quotient step for the
// divisor, dividend and constant wires, and before any use.
// The host reads each quotient bit as soon as it exists (READ may come
// between gates) and the remainder at the end, decodes
// them with the garbler's labels and compares them with a / b and a % b.
// It prints the gate mix and the cycles per gate type measured by the
// coprocessor's own counters.
// SCK runs at 5/3 of the core clock, near the fastest the serial link
// allows (about twice the core clock).
module tb_divide_workload;
  import gc_pkg::*;
  import gc_model_pkg::*;

  localparam int N      = 64;
  localparam int SLOTS  = 8192;
  localparam int MARGIN = 1024;    // refresh a wire this many IDs before it would be overwritten
  localparam int HALF   = 3;       // SCK half period; core clock period 10 (SCK = 5/3 core)
  localparam int MAXW   = 65536;

  logic clk = 0, rst_n = 1;
  logic spi_sck = 0, spi_cs_n = 0, spi_mosi = 0, spi_miso, perf_clear = 0, overrun;
  logic [31:0] perf_idle_cycles, perf_and_count, perf_and_cycles, perf_xor_count, perf_xor_cycles,
               perf_buf_count, perf_last_cycles;
  wire_id_t head;
  int checks = 0, failures = 0;
  int n_and = 0, n_xor = 0, n_buf = 0;

  always #5 clk = !clk;

  gc_coproc_top dut (.*);

  // ---------------- host side: SPI ----------------
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
    for (int i = ID_BYTES - 1; i >= 0; i--) tx(v[8*i +: 8]);
  endtask
  task automatic tx_label(input label_t l);
    for (int i = LABEL_B - 1; i >= 0; i--) tx(l[8*i +: 8]);
  endtask

  // ---------------- garbler bookkeeping ----------------
  label_t delta;
  label_t c0  [MAXW];   // false label of each wire ID
  logic   val [MAXW];   // plaintext value (known to the testbench only)
  int     next_id = 0;

  function automatic label_t active(input int w);
    return c0[w] ^ (val[w] ? delta : '0);
  endfunction

  // latest[w]: the newest copy of wire w (w itself until it is copied)
  int latest [MAXW];

  // the ID to use for wire w now: copy it with a BUF gate first if the
  // store may soon overwrite it
  task automatic fresh(input int w, output int nw);
    nw = latest[w];
    if (next_id - nw >= SLOTS - MARGIN) begin
      c0[next_id] = c0[nw]; val[next_id] = val[nw];
      tx(OP_BUF); tx_id(nw); tx_id(next_id);
      n_buf++;
      latest[next_id] = next_id;
      latest[w] = next_id;
      nw = next_id++;
    end
  endtask

  task automatic g_xor(input int x0, input int y0, output int z);
    int x, y;
    fresh(x0, x); fresh(y0, y);
    z = next_id++;
    latest[z] = z;
    c0[z] = c0[x] ^ c0[y]; val[z] = val[x] ^ val[y];
    tx(OP_XOR); tx_id(x); tx_id(y); tx_id(z);
    n_xor++;
  endtask

  task automatic g_and(input int x0, input int y0, output int z);
    and_gate_t g;
    int x, y;
    fresh(x0, x); fresh(y0, y);
    z = next_id++;
    latest[z] = z;
    g = garble_and(c0[x], c0[y], delta);
    c0[z] = g.c0; val[z] = val[x] & val[y];
    tx(OP_AND); tx_id(x); tx_id(y);
    for (int r = 1; r < 4; r++) tx_label(g.ct[r]);
    tx_id(z);
    n_and++;
  endtask

  task automatic read_bit(input int w, output logic bit_out, output logic ok);
    label_t got;
    logic [7:0] q;
    tx(OP_SETADDR); tx_id(w);
    tx(OP_READ); for (int i = 0; i < RD_GAP; i++) tx(8'h00);
    for (int i = LABEL_B - 1; i >= 0; i--) begin
      xfer(8'h00, q);
      got[8*i +: 8] = q;
    end
    bit_out = (got == (c0[w] ^ delta));
    ok      = (got == c0[w]) || (got == (c0[w] ^ delta));
  endtask

  // ---------------- the division ----------------
  int a_w [N], b_w [N + 1], r_w [N + 1], q_w [N];
  int zero_w, one_w;

  initial begin
    logic [N-1:0] a, b, qexp, rexp, qgot, rgot;
    logic ok;
    int sh [N + 1], d [N + 1], t2 [N + 1], br, t1, t3, nb, sel, tmp;

    a = {$urandom, $urandom};
    b = {32'h0, $urandom} | 1;
    qexp = a / b;
    rexp = a % b;
    delta = {$urandom, $urandom, $urandom, $urandom} | 128'h1;

    // reset and chip select edges clear the SCK-domain registers
    #1 rst_n = 0;
    #1 spi_cs_n = 1;
    #23 rst_n = 1;
    #100;
    spi_cs_n = 0; #HALF;

    // garbled inputs: 0, 1, a, b
    tx(OP_SETADDR); tx_id(0);
    zero_w = next_id++; c0[zero_w] = {$urandom, $urandom, $urandom, $urandom}; val[zero_w] = 0;
    one_w  = next_id++; c0[one_w]  = {$urandom, $urandom, $urandom, $urandom}; val[one_w]  = 1;
    for (int i = 0; i < N; i++) begin
      a_w[i] = next_id++; c0[a_w[i]] = {$urandom, $urandom, $urandom, $urandom}; val[a_w[i]] = a[i];
    end
    for (int i = 0; i < N; i++) begin
      b_w[i] = next_id++; c0[b_w[i]] = {$urandom, $urandom, $urandom, $urandom}; val[b_w[i]] = b[i];
    end
    b_w[N] = zero_w;
    for (int w = 0; w < next_id; w++) begin tx(OP_WRITE); tx_label(active(w)); end
    for (int w = 0; w < MAXW; w++) latest[w] = w;

    for (int j = 0; j <= N; j++) r_w[j] = zero_w;
    for (int i = N - 1; i >= 0; i--) begin
      // keep every wire that later steps need inside the store's window;
      // one step adds fewer than MARGIN wire IDs
      fresh(zero_w, tmp);
      fresh(one_w, tmp);
      for (int j = 0; j <= i; j++) fresh(a_w[j], tmp);
      for (int j = 0; j < N; j++) fresh(b_w[j], tmp);
      // shift in the next dividend bit
      sh[0] = a_w[i];
      for (int j = 1; j <= N; j++) sh[j] = r_w[j - 1];
      // subtract b with a borrow chain
      br = zero_w;
      for (int j = 0; j <= N; j++) begin
        g_xor(sh[j], b_w[j], t1);
        g_xor(t1, br, d[j]);
        g_xor(b_w[j], br, t2[j]);
        g_and(t1, t2[j], t3);
        g_xor(br, t3, nb);
        br = nb;
      end
      // borrow = 1: keep the shifted remainder; quotient bit = !borrow
      for (int j = 0; j <= N; j++) begin
        g_and(br, t2[j], sel);
        g_xor(d[j], sel, r_w[j]);
      end
      g_xor(br, one_w, q_w[i]);
      // read the quotient bit now, before later wires reuse its slot
      read_bit(q_w[i], qgot[i], ok);
      checks++; if (!ok) begin failures++; $display("FAIL q[%0d] label is neither label", i); end
      if (i % 8 == 0) $display("quotient bit %0d done, %0d wires so far", i, next_id);
    end

    // read back and decode
    for (int i = 0; i < N; i++) begin
      read_bit(r_w[i], rgot[i], ok);
      checks++; if (!ok) begin failures++; $display("FAIL r[%0d] label is neither label", i); end
    end
    #HALF spi_cs_n = 1;
    #200;
    checks++;
    if (qgot !== qexp) begin failures++; $display("FAIL quotient %h, expected %h", qgot, qexp); end
    checks++;
    if (rgot !== rexp) begin failures++; $display("FAIL remainder %h, expected %h", rgot, rexp); end
    checks++;
    if (overrun) begin failures++; $display("FAIL overrun"); end
    checks++;
    if (perf_and_count != 32'(n_and) || perf_xor_count != 32'(n_xor) || perf_buf_count != 32'(n_buf)) begin
      failures++; $display("FAIL gate counters");
    end
    checks++;
    if (n_buf == 0 || next_id <= SLOTS) begin failures++; $display("FAIL no wrap-around or refresh happened"); end
    $display("%0d / %0d = %0d rem %0d", a, b, qgot, rgot);
    $display("gates: %0d AND, %0d XOR, %0d BUF refreshes; %0d wire IDs", n_and, n_xor, n_buf, next_id);
    $display("cycles per gate: AND %0d, XOR %0d (SCK = 5/3 core clock)",
             perf_and_cycles / perf_and_count, perf_xor_cycles / perf_xor_count);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
