// gc_coproc_top: garbled-circuit evaluation coprocessor.
//
// The host (the evaluator of Yao's garbled circuits, which holds the
// circuit description) streams one instruction per gate over SPI. The
// coprocessor keeps every active wire label in its own label memory and
// evaluates the gate there, so the host sends only wire IDs and, for AND
// gates, the three ciphertexts of the row-reduced truth table:
//   spi_slave -> instr_decoder -> gate_engine <-> label_mem (4 x SPRAM)
//                                      |   \-> pp_select
//                                      \-> aes_hash (aes_ttable_rom)
// XOR gates cost no cryptography (free XOR), BUF copies a label, and AND
// gates are decrypted with an AES-128 hash and point-and-permute. DMA
// instructions (SETADDR, WRITE, READ) load the garbled inputs and read
// back the output labels. perf_counters measure idle time on the link and
// the average cost of each gate type.
//
// Ports: core clock and active-low reset, the four SPI pins, the counter
// outputs and two status signals. SCK may run at up to about twice the
// core clock. Clock generation is outside this module.
module gc_coproc_top
  import gc_pkg::*;
#(
  parameter int unsigned SLOTS  = 8192,
  parameter int unsigned PERF_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              spi_sck,
  input  logic              spi_cs_n,
  input  logic              spi_mosi,
  output logic              spi_miso,
  input  logic              perf_clear,
  output logic [PERF_W-1:0] perf_idle_cycles,
  output logic [PERF_W-1:0] perf_and_count,
  output logic [PERF_W-1:0] perf_and_cycles,
  output logic [PERF_W-1:0] perf_xor_count,
  output logic [PERF_W-1:0] perf_xor_cycles,
  output logic [PERF_W-1:0] perf_buf_count,
  output logic [PERF_W-1:0] perf_last_cycles,
  output logic              overrun,
  output wire_id_t          head
);

  logic       rx_valid;
  logic [7:0] rx_byte, tx_byte;

  spi_slave u_spi (
    .clk      (clk),
    .rst_n    (rst_n),
    .spi_sck  (spi_sck),
    .spi_cs_n (spi_cs_n),
    .spi_mosi (spi_mosi),
    .spi_miso (spi_miso),
    .rx_valid (rx_valid),
    .rx_byte  (rx_byte),
    .tx_byte  (tx_byte)
  );

  logic     ev_op, ev_addr, ev_wdata, ev_read, ev_ida, ev_idb, ev_ct, ev_gid, ev_end;
  opcode_e  op;
  row_t     ct_idx;
  wire_id_t field_id;
  label_t   field_data, rd_label;

  instr_decoder u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .rx_valid   (rx_valid),
    .rx_byte    (rx_byte),
    .ev_op      (ev_op),
    .op         (op),
    .ev_addr    (ev_addr),
    .ev_wdata   (ev_wdata),
    .ev_read    (ev_read),
    .ev_ida     (ev_ida),
    .ev_idb     (ev_idb),
    .ev_ct      (ev_ct),
    .ct_idx     (ct_idx),
    .ev_gid     (ev_gid),
    .ev_end     (ev_end),
    .field_id   (field_id),
    .field_data (field_data),
    .rd_label   (rd_label),
    .tx_byte    (tx_byte)
  );

  logic     mem_req, mem_we, mem_busy, mem_done;
  wire_id_t mem_id;
  label_t   mem_wdata, mem_rdata;
  logic     aes_start, aes_done;
  label_t   aes_key, aes_pt, aes_ct;
  logic     instr_done;

  gate_engine u_eng (
    .clk        (clk),
    .rst_n      (rst_n),
    .ev_op      (ev_op),
    .op         (op),
    .ev_addr    (ev_addr),
    .ev_wdata   (ev_wdata),
    .ev_read    (ev_read),
    .ev_ida     (ev_ida),
    .ev_idb     (ev_idb),
    .ev_ct      (ev_ct),
    .ct_idx     (ct_idx),
    .ev_gid     (ev_gid),
    .field_id   (field_id),
    .field_data (field_data),
    .rd_label   (rd_label),
    .mem_req    (mem_req),
    .mem_we     (mem_we),
    .mem_id     (mem_id),
    .mem_wdata  (mem_wdata),
    .mem_busy   (mem_busy),
    .mem_done   (mem_done),
    .mem_rdata  (mem_rdata),
    .aes_start  (aes_start),
    .aes_key    (aes_key),
    .aes_pt     (aes_pt),
    .aes_done   (aes_done),
    .aes_ct     (aes_ct),
    .instr_done (instr_done),
    .overrun    (overrun),
    .head       (head)
  );

  label_mem #(.SLOTS(SLOTS)) u_mem (
    .clk   (clk),
    .rst_n (rst_n),
    .req   (mem_req),
    .we    (mem_we),
    .id    (mem_id),
    .wdata (mem_wdata),
    .busy  (mem_busy),
    .done  (mem_done),
    .rdata (mem_rdata)
  );

  aes_hash u_aes (
    .clk   (clk),
    .rst_n (rst_n),
    .start (aes_start),
    .key   (aes_key),
    .pt    (aes_pt),
    .busy  (),
    .done  (aes_done),
    .ct    (aes_ct)
  );

  perf_counters #(.WIDTH(PERF_W)) u_perf (
    .clk         (clk),
    .rst_n       (rst_n),
    .clear       (perf_clear),
    .ev_op       (ev_op),
    .op          (op),
    .ev_end      (ev_end),
    .instr_done  (instr_done),
    .idle_cycles (perf_idle_cycles),
    .and_count   (perf_and_count),
    .and_cycles  (perf_and_cycles),
    .xor_count   (perf_xor_count),
    .xor_cycles  (perf_xor_cycles),
    .buf_count   (perf_buf_count),
    .last_cycles (perf_last_cycles)
  );

endmodule
