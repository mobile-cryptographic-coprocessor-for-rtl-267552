// tb_instr_decoder: feeds byte streams of every instruction type (with
// skipped filler bytes between them) and checks the sequence of field
// strobes and field values against the instruction formats, and the
// label bytes offered on tx_byte during a READ.
module tb_instr_decoder;
  import gc_pkg::*;

  typedef enum {K_OP, K_ADDR, K_WDATA, K_READ, K_IDA, K_IDB, K_CT, K_GID, K_END} kind_e;
  typedef struct packed { kind_e kind; logic [7:0] op; label_t val; logic [1:0] idx; } ev_t;

  logic clk = 0, rst_n = 0, rx_valid = 0;
  logic [7:0] rx_byte = 0, tx_byte;
  logic ev_op, ev_addr, ev_wdata, ev_read, ev_ida, ev_idb, ev_ct, ev_gid, ev_end;
  opcode_e op;
  row_t ct_idx;
  wire_id_t field_id;
  label_t field_data, rd_label;
  int checks = 0, failures = 0;
  ev_t seen [$], want [$];

  always #5 clk = !clk;

  instr_decoder dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (ev_op)    seen.push_back('{K_OP, 8'(op), '0, 0});
    if (ev_addr)  seen.push_back('{K_ADDR, 0, label_t'(field_id), 0});
    if (ev_wdata) seen.push_back('{K_WDATA, 0, field_data, 0});
    if (ev_read)  seen.push_back('{K_READ, 0, '0, 0});
    if (ev_ida)   seen.push_back('{K_IDA, 0, label_t'(field_id), 0});
    if (ev_idb)   seen.push_back('{K_IDB, 0, label_t'(field_id), 0});
    if (ev_ct)    seen.push_back('{K_CT, 0, field_data, ct_idx});
    if (ev_gid)   seen.push_back('{K_GID, 0, label_t'(field_id), 0});
    if (ev_end)   seen.push_back('{K_END, 0, '0, 0});
  end

  task automatic send(input logic [7:0] b);
    @(negedge clk); rx_valid = 1; rx_byte = b;
    @(negedge clk); rx_valid = 0;
    repeat (4) @(negedge clk);
  endtask
  task automatic send_id(input wire_id_t id);
    for (int i = ID_BYTES - 1; i >= 0; i--) send(id[8*i +: 8]);
  endtask
  task automatic send_label(input label_t l);
    for (int i = LABEL_B - 1; i >= 0; i--) send(l[8*i +: 8]);
  endtask
  function automatic label_t rnd_label();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
  function automatic wire_id_t rnd_id();
    return wire_id_t'($urandom);
  endfunction

  initial begin
    wire_id_t a, b, g;
    label_t l, c [4];
    rd_label = rnd_label();
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (5) begin
      send(8'h00); send(8'hAA);                       // skipped
      a = rnd_id();
      send(OP_SETADDR); send_id(a);
      want.push_back('{K_OP, OP_SETADDR, '0, 0}); want.push_back('{K_ADDR, 0, label_t'(a), 0});
      want.push_back('{K_END, 0, '0, 0});
      l = rnd_label();
      send(OP_WRITE); send_label(l);
      want.push_back('{K_OP, OP_WRITE, '0, 0}); want.push_back('{K_WDATA, 0, l, 0});
      want.push_back('{K_END, 0, '0, 0});
      a = rnd_id(); b = rnd_id(); g = rnd_id();
      send(OP_XOR); send_id(a); send_id(b); send_id(g);
      want.push_back('{K_OP, OP_XOR, '0, 0}); want.push_back('{K_IDA, 0, label_t'(a), 0});
      want.push_back('{K_IDB, 0, label_t'(b), 0}); want.push_back('{K_GID, 0, label_t'(g), 0});
      want.push_back('{K_END, 0, '0, 0});
      send(OP_BUF); send_id(b); send_id(g);
      want.push_back('{K_OP, OP_BUF, '0, 0}); want.push_back('{K_IDA, 0, label_t'(b), 0});
      want.push_back('{K_GID, 0, label_t'(g), 0}); want.push_back('{K_END, 0, '0, 0});
      for (int r = 1; r < 4; r++) c[r] = rnd_label();
      send(OP_AND); send_id(a); send_id(b);
      for (int r = 1; r < 4; r++) send_label(c[r]);
      send_id(g);
      want.push_back('{K_OP, OP_AND, '0, 0}); want.push_back('{K_IDA, 0, label_t'(a), 0});
      want.push_back('{K_IDB, 0, label_t'(b), 0});
      for (int r = 1; r < 4; r++) want.push_back('{K_CT, 0, c[r], 2'(r)});
      want.push_back('{K_GID, 0, label_t'(g), 0}); want.push_back('{K_END, 0, '0, 0});
      // READ: the label byte offered after the k-th byte (0 = opcode) is
      // byte k - (RD_GAP-1), zero outside the label
      send(OP_READ);
      want.push_back('{K_OP, OP_READ, '0, 0}); want.push_back('{K_READ, 0, '0, 0});
      for (int k = 0; k < RD_GAP + 16; k++) begin
        checks++;
        if (tx_byte !== ((k >= RD_GAP - 1 && k < RD_GAP + 15) ? rd_label[127 - 8*(k - RD_GAP + 1) -: 8] : 8'h00)) begin
          failures++; $display("FAIL tx byte %0d: %h", k, tx_byte);
        end
        send(8'h5C);
      end
      want.push_back('{K_END, 0, '0, 0});
      checks++;
      if (tx_byte !== 8'h00) begin failures++; $display("FAIL tx after READ"); end
    end
    repeat (4) @(negedge clk);
    checks++;
    if (seen.size() != want.size()) begin
      failures++; $display("FAIL %0d events, expected %0d", seen.size(), want.size());
    end
    for (int i = 0; i < want.size() && i < seen.size(); i++) begin
      checks++;
      if (seen[i] !== want[i]) begin
        failures++; $display("FAIL event %0d: kind %0d/%0d", i, seen[i].kind, want[i].kind);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
