// gate_engine: event-driven, memory-to-memory execution of the six
// coprocessor instructions.
//
// There is no central sequencer with fixed timings. Each field strobe
// from the decoder starts the memory or hash operation that needs it, and
// each "done" of the label memory or the AES hash is forwarded to the
// next step according to the current gate type:
//   input ID A  -> fetch label A  -> (BUF) result = A
//   input ID B  -> fetch label B  -> (XOR) result = A ^ B  (free XOR)
//                                 -> (AND) start AES(key A, data B) and
//                                    hand the color bits to pp_select
//   ciphertext  -> pp_select keeps the one the pointer names
//   AES done    -> pp_select forms hash ^ ciphertext (row reduction)
//   gate ID     -> store the result at the gate ID as soon as it exists
// The DMA instructions use a read/write head: SETADDR loads it, WRITE
// stores the received label at the head, READ fetches the label at the
// head into rd_label for the serial reply; both then advance the head.
// The three result sources (A, A^B, AND-gate output) form the output
// multiplexer in front of the memory write port.
//
// Interface: decoder strobes in, one request port to label_mem, one to
// aes_hash. instr_done pulses when an instruction's last action is over
// (its store, its DMA access, or the head load). overrun is a sticky
// flag for a memory request that arrived while the previous one was
// still waiting; it cannot happen while SCK is at most about twice the
// core clock (a byte slot of four core cycles or more).
// Timing: a gate's store starts one cycle after its gate ID (or after the
// result, if that comes later) and completes three cycles later.
// The event-driven structure and every step above follow the
// architecture; head auto-increment and the overrun flag are this
// design's choices.
module gate_engine
  import gc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // decoder
  input  logic     ev_op,
  input  opcode_e  op,
  input  logic     ev_addr,
  input  logic     ev_wdata,
  input  logic     ev_read,
  input  logic     ev_ida,
  input  logic     ev_idb,
  input  logic     ev_ct,
  input  row_t     ct_idx,
  input  logic     ev_gid,
  input  wire_id_t field_id,
  input  label_t   field_data,
  output label_t   rd_label,
  // label memory
  output logic     mem_req,
  output logic     mem_we,
  output wire_id_t mem_id,
  output label_t   mem_wdata,
  input  logic     mem_busy,
  input  logic     mem_done,
  input  label_t   mem_rdata,
  // AES hash
  output logic     aes_start,
  output label_t   aes_key,
  output label_t   aes_pt,
  input  logic     aes_done,
  input  label_t   aes_ct,
  // status
  output logic     instr_done,
  output logic     overrun,
  output wire_id_t head
);

  typedef enum logic [1:0] {D_A, D_B, D_RD, D_WR} dest_e;

  opcode_e  cur_op;
  label_t   lab_a, lab_b, res;
  logic     res_ok, gid_ok;
  wire_id_t gid;

  // one-deep memory request queue
  logic     q_valid, q_we;
  wire_id_t q_id;
  label_t   q_wdata;
  dest_e    q_dest;
  logic     in_flight;
  dest_e    fl_dest;

  // pp_select
  logic   pp_clear, pp_ptr_valid, pp_valid;
  label_t pp_result;

  pp_select u_pp (
    .clk          (clk),
    .rst_n        (rst_n),
    .clear        (pp_clear),
    .ptr_valid    (pp_ptr_valid),
    .color_a      (lab_a[0]),
    .color_b      (lab_b[0]),
    .ct_valid     (ev_ct),
    .ct_idx       (ct_idx),
    .ct           (field_data),
    .hash_valid   (aes_done),
    .hash         (aes_ct),
    .result_valid (pp_valid),
    .result       (pp_result)
  );

  assign pp_clear  = ev_op;
  assign aes_key   = lab_a;
  assign aes_pt    = lab_b;

  // issue the queued request when the memory is free
  assign mem_req   = q_valid && !mem_busy && !in_flight;
  assign mem_we    = q_we;
  assign mem_id    = q_id;
  assign mem_wdata = q_wdata;

  // a new request from this cycle's events (at most one per cycle)
  logic     new_req, new_we;
  wire_id_t new_id;
  label_t   new_wdata;
  dest_e    new_dest;
  logic     store_now, other_req;

  // the gate ID strobe never shares a cycle with another field strobe,
  // but a late result may: the field strobe then goes first
  assign other_req = ev_ida || ev_idb || ev_wdata || ev_read;
  assign store_now = gid_ok && (res_ok || (cur_op == OP_AND && pp_valid)) &&
                     (cur_op inside {OP_AND, OP_XOR, OP_BUF}) && !other_req;

  always_comb begin
    new_req   = 1'b0;
    new_we    = 1'b0;
    new_id    = field_id;
    new_wdata = field_data;
    new_dest  = D_A;
    if (ev_ida) begin
      new_req = 1'b1; new_dest = D_A;
    end else if (ev_idb) begin
      new_req = 1'b1; new_dest = D_B;
    end else if (ev_wdata) begin
      new_req = 1'b1; new_we = 1'b1; new_id = head; new_dest = D_WR;
    end else if (ev_read) begin
      new_req = 1'b1; new_id = head; new_dest = D_RD;
    end else if (store_now) begin
      new_req   = 1'b1;
      new_we    = 1'b1;
      new_id    = gid;
      new_wdata = (cur_op == OP_AND && !res_ok) ? pp_result : res;
      new_dest  = D_WR;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_op       <= OP_NOP;
      lab_a        <= '0;
      lab_b        <= '0;
      res          <= '0;
      res_ok       <= 1'b0;
      gid_ok       <= 1'b0;
      gid          <= '0;
      q_valid      <= 1'b0;
      q_we         <= 1'b0;
      q_id         <= '0;
      q_wdata      <= '0;
      q_dest       <= D_A;
      in_flight    <= 1'b0;
      fl_dest      <= D_A;
      rd_label     <= '0;
      head         <= '0;
      aes_start    <= 1'b0;
      pp_ptr_valid <= 1'b0;
      instr_done   <= 1'b0;
      overrun      <= 1'b0;
    end else begin
      aes_start    <= 1'b0;
      pp_ptr_valid <= 1'b0;
      instr_done   <= 1'b0;

      if (ev_op) begin
        cur_op <= op;
        res_ok <= 1'b0;
        gid_ok <= 1'b0;
      end
      if (ev_addr) begin
        head       <= field_id;
        instr_done <= 1'b1;
      end
      if (ev_gid) begin
        gid    <= field_id;
        gid_ok <= 1'b1;
      end
      if (store_now) gid_ok <= 1'b0;   // store is queued once

      // memory request queue
      if (mem_req) begin
        q_valid   <= 1'b0;
        in_flight <= 1'b1;
        fl_dest   <= q_dest;
      end
      if (new_req) begin
        if (q_valid && !mem_req) overrun <= 1'b1;
        q_valid <= 1'b1;
        q_we    <= new_we;
        q_id    <= new_id;
        q_wdata <= new_wdata;
        q_dest  <= new_dest;
        if (ev_wdata || ev_read) head <= head + 1'b1;
      end

      // completion events, forwarded by gate type
      if (mem_done) begin
        in_flight <= 1'b0;
        unique case (fl_dest)
          D_A: begin
            lab_a <= mem_rdata;
            if (cur_op == OP_BUF) begin
              res    <= mem_rdata;
              res_ok <= 1'b1;
            end
          end
          D_B: begin
            lab_b <= mem_rdata;
            if (cur_op == OP_XOR) begin
              res    <= lab_a ^ mem_rdata;
              res_ok <= 1'b1;
            end else if (cur_op == OP_AND) begin
              aes_start    <= 1'b1;
              pp_ptr_valid <= 1'b1;
            end
          end
          D_RD: begin
            rd_label   <= mem_rdata;
            instr_done <= 1'b1;
          end
          D_WR: instr_done <= 1'b1;
        endcase
      end
    end
  end

  // At most one new memory request per cycle.
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot0({ev_ida, ev_idb, ev_wdata, ev_read}))
    else $error("gate_engine: two field strobes in one cycle");

endmodule
