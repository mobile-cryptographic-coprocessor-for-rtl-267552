// instr_decoder: splits the byte stream from the serial link into
// instructions and their fields, and strobes one control line as each
// field completes.
//
// Instruction formats (all multi-byte fields most significant byte first;
// IDs are ID_BYTES = 2 bytes, labels and ciphertexts 16 bytes):
//   SETADDR  op id                 -> ev_addr
//   WRITE    op label              -> ev_wdata
//   READ     op + RD_GAP + 16 filler bytes -> ev_read at the opcode; the
//            label comes back on tx_byte in the last 16 of those slots
//   AND      op idA idB ct1 ct2 ct3 gid
//   XOR      op idA idB gid
//   BUF      op idA gid
// Gate fields strobe ev_ida, ev_idb, ev_ct (with ct_idx 1..3) and ev_gid.
// Any other opcode byte is skipped. There is no framing beyond the fixed
// field order. ev_op pulses with op when an opcode byte is taken, and
// ev_end pulses when the last byte of an instruction has been taken.
// Field values appear on field_id / field_data in the cycle of their
// strobe and hold until the next field completes.
// Timing: each strobe is registered, one cycle after the rx_valid of the
// field's last byte.
// The field order (gate type, input IDs, ciphertexts, gate ID) and the
// six instructions follow the architecture; the opcode values, the field
// widths and the READ reply slot are this design's choices.
module instr_decoder
  import gc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     rx_valid,
  input  logic [7:0] rx_byte,
  // field strobes
  output logic     ev_op,
  output opcode_e  op,
  output logic     ev_addr,
  output logic     ev_wdata,
  output logic     ev_read,
  output logic     ev_ida,
  output logic     ev_idb,
  output logic     ev_ct,
  output row_t     ct_idx,
  output logic     ev_gid,
  output logic     ev_end,
  output wire_id_t field_id,
  output label_t   field_data,
  // READ reply
  input  label_t   rd_label,
  output logic [7:0] tx_byte
);

  typedef enum logic [2:0] {F_OP, F_ADDR, F_WDATA, F_READ, F_IDA, F_IDB, F_CT, F_GID} field_e;

  field_e     field;
  logic [4:0] cnt;       // bytes of the current field taken so far
  label_t     sh;        // field shift register
  row_t       ct_n;      // ciphertext number being received
  logic [4:0] rd_idx;    // READ: label byte now offered on tx_byte

  function automatic logic [4:0] field_len(input field_e f);
    case (f)
      F_ADDR, F_IDA, F_IDB, F_GID: return 5'(ID_BYTES);
      F_WDATA, F_CT:               return 5'(LABEL_B);
      F_READ:                      return 5'(RD_GAP + LABEL_B);
      default:                     return 5'd1;
    endcase
  endfunction

  label_t sh_next;
  assign sh_next = {sh[LABEL_W-9:0], rx_byte};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      field      <= F_OP;
      cnt        <= '0;
      sh         <= '0;
      ct_n       <= 2'd1;
      op         <= OP_NOP;
      rd_idx     <= '0;
      ev_op      <= 1'b0;
      ev_addr    <= 1'b0;
      ev_wdata   <= 1'b0;
      ev_read    <= 1'b0;
      ev_ida     <= 1'b0;
      ev_idb     <= 1'b0;
      ev_ct      <= 1'b0;
      ct_idx     <= '0;
      ev_gid     <= 1'b0;
      ev_end     <= 1'b0;
      field_id   <= '0;
      field_data <= '0;
    end else begin
      {ev_op, ev_addr, ev_wdata, ev_read, ev_ida, ev_idb, ev_ct, ev_gid, ev_end} <= '0;
      if (rx_valid) begin
        if (field == F_OP) begin
          cnt <= '0;
          sh  <= '0;
          unique case (rx_byte)
            OP_SETADDR: begin op <= OP_SETADDR; ev_op <= 1'b1; field <= F_ADDR;  end
            OP_WRITE:   begin op <= OP_WRITE;   ev_op <= 1'b1; field <= F_WDATA; end
            OP_READ:    begin op <= OP_READ;    ev_op <= 1'b1; field <= F_READ;
                              ev_read <= 1'b1; rd_idx <= '0; end
            OP_AND:     begin op <= OP_AND;     ev_op <= 1'b1; field <= F_IDA; ct_n <= 2'd1; end
            OP_XOR:     begin op <= OP_XOR;     ev_op <= 1'b1; field <= F_IDA; end
            OP_BUF:     begin op <= OP_BUF;     ev_op <= 1'b1; field <= F_IDA; end
            default:    ;  // skipped
          endcase
        end else begin
          sh <= sh_next;
          if (field == F_READ) rd_idx <= rd_idx + 5'd1;
          if (cnt + 5'd1 == field_len(field)) begin
            cnt        <= '0;
            field_id   <= sh_next[ID_W-1:0];
            field_data <= sh_next;
            unique case (field)
              F_ADDR:  begin ev_addr  <= 1'b1; ev_end <= 1'b1; field <= F_OP; end
              F_WDATA: begin ev_wdata <= 1'b1; ev_end <= 1'b1; field <= F_OP; end
              F_READ:  begin                   ev_end <= 1'b1; field <= F_OP; end
              F_IDA: begin
                ev_ida <= 1'b1;
                field  <= (op == OP_BUF) ? F_GID : F_IDB;
              end
              F_IDB: begin
                ev_idb <= 1'b1;
                field  <= (op == OP_AND) ? F_CT : F_GID;
              end
              F_CT: begin
                ev_ct  <= 1'b1;
                ct_idx <= ct_n;
                ct_n   <= ct_n + 2'd1;
                if (ct_n == row_t'(N_CT)) field <= F_GID;
              end
              F_GID: begin ev_gid <= 1'b1; ev_end <= 1'b1; field <= F_OP; end
              default: field <= F_OP;
            endcase
          end else begin
            cnt <= cnt + 5'd1;
          end
        end
      end
    end
  end

  // READ reply: with the link's two-slot reply lag, the value set after
  // filler byte rd_idx goes out in slot rd_idx + 2 after the opcode, so
  // label byte 0 (the most significant) is offered from rd_idx = RD_GAP-1;
  // zero elsewhere
  logic [4:0] rd_byte;
  assign rd_byte = rd_idx - 5'(RD_GAP - 1);

  always_comb begin
    tx_byte = 8'h00;
    if (field == F_READ && rd_idx >= 5'(RD_GAP - 1) && rd_byte < 5'(LABEL_B))
      tx_byte = rd_label[LABEL_W - 1 - 8*rd_byte -: 8];
  end

endmodule
