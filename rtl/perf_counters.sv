// perf_counters: cycle counters for measuring the coprocessor.
//
// An instruction starts with its opcode strobe (ev_op) and is over once
// both its last byte has been received (ev_end) and its last action has
// finished (instr_done), in either order. With a fast link the next
// opcode can arrive while the last store of an instruction is still in
// flight; the instruction is then closed at that opcode and its late
// instr_done pulse is skipped. Counted:
//   idle_cycles   cycles from the end of one instruction to the start of
//                 the next (time the coprocessor waits on the link)
//   and_count, and_cycles, xor_count, xor_cycles, buf_count
//                 gates completed and the cycles they took from opcode to
//                 end; cycles/count is the average cost of a gate type
//   last_cycles   cycles of the most recent instruction
// Counters are WIDTH bits and wrap. clear zeroes them all.
// The idle counter and the per-gate-type cycle averages are the
// measurements the coprocessor was characterised with; the counter
// widths, the clear input and the per-type split into totals and counts
// are this design's choices.
module perf_counters
  import gc_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             ev_op,
  input  opcode_e          op,
  input  logic             ev_end,
  input  logic             instr_done,
  output logic [WIDTH-1:0] idle_cycles,
  output logic [WIDTH-1:0] and_count,
  output logic [WIDTH-1:0] and_cycles,
  output logic [WIDTH-1:0] xor_count,
  output logic [WIDTH-1:0] xor_cycles,
  output logic [WIDTH-1:0] buf_count,
  output logic [WIDTH-1:0] last_cycles
);

  logic             running, seen_end, seen_done, started, skip_done;
  opcode_e          cur;
  logic [WIDTH-1:0] cyc;
  logic             finish, done_mine, closing;

  // a done pulse owed by an instruction already closed is not this one's
  assign done_mine = instr_done && !skip_done;
  // the instruction ends in the cycle the second of its two end events
  // arrives, or when the next opcode arrives first
  assign finish    = running && (seen_end || ev_end) && (seen_done || done_mine);
  assign closing   = running && (finish || ev_op);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= 1'b0;
      seen_end    <= 1'b0;
      seen_done   <= 1'b0;
      started     <= 1'b0;
      skip_done   <= 1'b0;
      cur         <= OP_NOP;
      cyc         <= '0;
      idle_cycles <= '0;
      and_count   <= '0;
      and_cycles  <= '0;
      xor_count   <= '0;
      xor_cycles  <= '0;
      buf_count   <= '0;
      last_cycles <= '0;
    end else if (clear) begin
      running     <= 1'b0;
      seen_end    <= 1'b0;
      seen_done   <= 1'b0;
      started     <= 1'b0;
      skip_done   <= 1'b0;
      cyc         <= '0;
      idle_cycles <= '0;
      and_count   <= '0;
      and_cycles  <= '0;
      xor_count   <= '0;
      xor_cycles  <= '0;
      buf_count   <= '0;
      last_cycles <= '0;
    end else begin
      if (closing) begin
        last_cycles <= cyc;
        unique case (cur)
          OP_AND: begin and_count <= and_count + 1; and_cycles <= and_cycles + cyc; end
          OP_XOR: begin xor_count <= xor_count + 1; xor_cycles <= xor_cycles + cyc; end
          OP_BUF: buf_count <= buf_count + 1;
          default: ;
        endcase
      end
      if (ev_op) begin
        running   <= 1'b1;
        seen_end  <= 1'b0;
        seen_done <= 1'b0;
        cur       <= op;
        cyc       <= 1;
        started   <= 1'b1;
        // closed before its done pulse: skip that pulse later
        skip_done <= (running && !finish) || (skip_done && !instr_done);
      end else begin
        if (instr_done && skip_done) skip_done <= 1'b0;
        if (running) begin
          if (ev_end)    seen_end  <= 1'b1;
          if (done_mine) seen_done <= 1'b1;
          if (finish) running <= 1'b0;
          else        cyc     <= cyc + 1;
        end else if (started) begin
          idle_cycles <= idle_cycles + 1;   // between two instructions
        end
      end
    end
  end

endmodule
