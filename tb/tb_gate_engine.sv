// tb_gate_engine: drives gate_engine (with label_mem and aes_hash) with
// field strobes as the decoder would produce them. It loads random input
// labels with SETADDR/WRITE, evaluates a random circuit of XOR, BUF and
// AND gates garbled by the reference garbler, then reads every wire back
// with READ and compares it with the active label the garbler predicts.
// It also makes the gate ID arrive before an AND gate's hash is ready,
// and checks that every pointer row 0..3 was used.
module tb_gate_engine;
  import gc_pkg::*;
  import gc_model_pkg::*;

  localparam int N_IN = 8, N_GATES = 60;

  logic clk = 0, rst_n = 0;
  logic ev_op = 0, ev_addr = 0, ev_wdata = 0, ev_read = 0, ev_ida = 0, ev_idb = 0, ev_ct = 0, ev_gid = 0;
  opcode_e op = OP_NOP;
  row_t ct_idx = 0;
  wire_id_t field_id = 0, head;
  label_t field_data = 0, rd_label;
  logic mem_req, mem_we, mem_busy, mem_done, aes_start, aes_done, instr_done, overrun;
  wire_id_t mem_id;
  label_t mem_wdata, mem_rdata, aes_key, aes_pt, aes_ct;
  int checks = 0, failures = 0;
  int rows [4], late_gid = 0, n_and = 0, n_xor = 0, n_buf = 0;

  always #5 clk = !clk;

  gate_engine dut (.*);
  label_mem u_mem (.clk, .rst_n, .req(mem_req), .we(mem_we), .id(mem_id), .wdata(mem_wdata),
                   .busy(mem_busy), .done(mem_done), .rdata(mem_rdata));
  aes_hash u_aes (.clk, .rst_n, .start(aes_start), .key(aes_key), .pt(aes_pt), .busy(),
                  .done(aes_done), .ct(aes_ct));

  task automatic strobe(ref logic s, input wire_id_t id, input label_t d, input int gap);
    @(negedge clk); s = 1; field_id = id; field_data = d;
    @(negedge clk); s = 0;
    repeat (gap) @(negedge clk);
  endtask
  task automatic opcode(input opcode_e o);
    @(negedge clk); ev_op = 1; op = o;
    @(negedge clk); ev_op = 0;
    repeat (6) @(negedge clk);
  endtask

  label_t delta, c0 [N_IN + N_GATES];
  logic   val [N_IN + N_GATES];

  function automatic label_t active(input int w);
    return c0[w] ^ (val[w] ? delta : '0);
  endfunction

  initial begin
    and_gate_t g;
    label_t la, lb;
    int a, b, t, gap;
    delta = {$urandom, $urandom, $urandom, $urandom} | 128'h1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // inputs
    opcode(OP_SETADDR); strobe(ev_addr, 0, '0, 4);
    for (int w = 0; w < N_IN; w++) begin
      c0[w]  = {$urandom, $urandom, $urandom, $urandom};
      val[w] = 1'($urandom);
      opcode(OP_WRITE); strobe(ev_wdata, 0, active(w), 8);
    end
    checks++;
    if (head != wire_id_t'(N_IN)) begin failures++; $display("FAIL head %0d", head); end
    // gates
    for (int w = N_IN; w < N_IN + N_GATES; w++) begin
      a = $urandom_range(w - 1); b = $urandom_range(w - 1);
      t = $urandom_range(4);
      if (t <= 1) begin
        n_xor++;
        c0[w] = c0[a] ^ c0[b]; val[w] = val[a] ^ val[b];
        opcode(OP_XOR); strobe(ev_ida, wire_id_t'(a), '0, 12); strobe(ev_idb, wire_id_t'(b), '0, 12);
        strobe(ev_gid, wire_id_t'(w), '0, 12);
      end else if (t == 2) begin
        n_buf++;
        c0[w] = c0[a]; val[w] = val[a];
        opcode(OP_BUF); strobe(ev_ida, wire_id_t'(a), '0, 12);
        strobe(ev_gid, wire_id_t'(w), '0, 12);
      end else begin
        n_and++;
        g = garble_and(c0[a], c0[b], delta);
        c0[w] = g.c0; val[w] = val[a] & val[b];
        la = active(a); lb = active(b);
        rows[{la[0], lb[0]}]++;
        gap = (w % 2) ? 7 : 20;          // gap 7: the gate ID comes before the hash
        if (gap == 7) late_gid++;
        opcode(OP_AND); strobe(ev_ida, wire_id_t'(a), '0, 12); strobe(ev_idb, wire_id_t'(b), '0, gap);
        for (int r = 1; r < 4; r++) begin
          @(negedge clk); ev_ct = 1; ct_idx = row_t'(r); field_data = g.ct[r];
          @(negedge clk); ev_ct = 0;
          repeat (gap) @(negedge clk);
        end
        strobe(ev_gid, wire_id_t'(w), '0, 50);
      end
    end
    // read every wire back
    opcode(OP_SETADDR); strobe(ev_addr, 0, '0, 4);
    for (int w = 0; w < N_IN + N_GATES; w++) begin
      opcode(OP_READ);
      @(negedge clk); ev_read = 1; @(negedge clk); ev_read = 0;
      repeat (8) @(negedge clk);
      checks++;
      if (rd_label !== active(w)) begin
        failures++; $display("FAIL wire %0d: %h exp %h", w, rd_label, active(w));
      end
    end
    checks++;
    if (overrun) begin failures++; $display("FAIL overrun"); end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (rows[r] == 0) begin failures++; $display("FAIL pointer row %0d never used", r); end
    end
    checks++;
    if (late_gid == 0 || n_xor == 0 || n_buf == 0) begin failures++; $display("FAIL coverage"); end
    $display("gates: and=%0d xor=%0d buf=%0d late gate IDs=%0d", n_and, n_xor, n_buf, late_gid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
