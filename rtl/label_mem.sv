// label_mem: wire label store of the coprocessor.
//
// Four 16K x 16 SPRAM blocks stand side by side to form one 64-bit wide,
// 16K deep memory; a 128-bit wire label therefore takes two words and
// every label access is two memory operations, issued on consecutive
// cycles (low half at word 2*slot, high half at word 2*slot+1). The store
// holds SLOTS = 8192 labels and is addressed directly by the low bits of
// the wire ID, so it behaves as a direct-mapped cache with no backing
// store: wire IDs that differ by a multiple of SLOTS share a slot.
//
// Interface: a one-cycle req with we/id/wdata starts an access when
// busy=0. A read raises done for one cycle, with the label on rdata, four
// cycles after the edge that took req; a write raises done three cycles
// after it. A req made
// while busy is ignored (the caller waits for busy=0).
// The four-block layout, the two-access split and the 8192-label,
// direct-mapped behaviour follow the architecture; the handshake is this
// design's own.
module label_mem
  import gc_pkg::*;
#(
  parameter int unsigned SLOTS = 8192
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     req,
  input  logic     we,
  input  wire_id_t id,
  input  label_t   wdata,
  output logic     busy,
  output logic     done,
  output label_t   rdata
);

  localparam int unsigned SLOT_W = $clog2(SLOTS);
  localparam int unsigned ADDR_W = SLOT_W + 1;

  typedef enum logic [1:0] {PH_IDLE, PH_LO, PH_HI, PH_CAP} phase_e;
  phase_e ph;

  logic              op_we;
  logic [SLOT_W-1:0] op_slot;
  label_t            op_wdata;
  logic [63:0]       lo_q;

  // SPRAM port, shared by the four blocks
  logic [ADDR_W-1:0] m_addr;
  logic [63:0]       m_wdata, m_rdata;
  logic              m_cs, m_we;

  always_comb begin
    m_cs    = (ph == PH_LO) || (ph == PH_HI);
    m_we    = m_cs && op_we;
    m_addr  = {op_slot, (ph == PH_HI)};
    m_wdata = (ph == PH_HI) ? op_wdata[127:64] : op_wdata[63:0];
  end

  for (genvar g = 0; g < 4; g++) begin : g_bank
    logic [13:0] a14;
    assign a14 = 14'(m_addr);
    spram_16kx16 u_spram (
      .clock      (clk),
      .address    (a14),
      .datain     (m_wdata[16*g +: 16]),
      .maskwren   (4'hF),
      .wren       (m_we),
      .chipselect (m_cs),
      .standby    (1'b0),
      .sleep      (1'b0),
      .poweroff   (1'b1),
      .dataout    (m_rdata[16*g +: 16])
    );
  end

  assign busy = (ph != PH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ph       <= PH_IDLE;
      op_we    <= 1'b0;
      op_slot  <= '0;
      op_wdata <= '0;
      lo_q     <= '0;
      rdata    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (ph)
        PH_IDLE: if (req) begin
          op_we    <= we;
          op_slot  <= id[SLOT_W-1:0];
          op_wdata <= wdata;
          ph       <= PH_LO;
        end
        PH_LO: ph <= PH_HI;
        PH_HI: begin
          lo_q <= m_rdata;          // low half read in PH_LO
          if (op_we) begin
            done <= 1'b1;
            ph   <= PH_IDLE;
          end else begin
            ph   <= PH_CAP;
          end
        end
        PH_CAP: begin
          rdata <= {m_rdata, lo_q};
          done  <= 1'b1;
          ph    <= PH_IDLE;
        end
      endcase
    end
  end

  initial assert (SLOTS * 2 <= 16384) else $error("label_mem: SLOTS exceeds SPRAM depth");

endmodule
