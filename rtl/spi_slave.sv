// spi_slave: serial link between the host and the coprocessor (SPI mode
// 0, most significant bit first, chip select active low).
//
// The shift registers run in the SCK clock domain: MOSI is sampled on the
// rising edge of SCK and MISO changes on the falling edge. Each complete
// received byte is parked in one of two holding registers, chosen by the
// parity of the byte count, and announced by flipping a toggle. The core
// clock domain passes the toggle through two flip-flops; a flip raises
// rx_valid for one cycle and rx_byte shows the holding register the byte
// went to. That register is not written again for two more bytes, so it
// is stable while the core reads it. The reply byte goes the other way:
// the byte on tx_byte is loaded into the MISO shift register on the
// falling SCK edge that ends a byte, and is sent in the next byte slot.
// Because tx_byte is sampled at the end of slot k, a value set by the
// core in response to the byte of slot k-1 (whose rx_valid comes early
// in slot k) goes out in slot k+1. The first byte of each chip-select
// frame sends 0x00.
// Timing: rx_valid follows the last SCK edge of a byte by 1 to 2 core
// cycles. A byte slot must last more than about 3 core cycles, so SCK
// may run at up to twice the core clock: each toggle level is then seen,
// and tx_byte settles before it is sampled.
// An SPI serial link in its own clock domain follows the architecture;
// the mode, the bit order and the crossing scheme are this design's
// choices.
module spi_slave (
  input  logic       clk,       // core clock
  input  logic       rst_n,     // core reset, active low
  input  logic       spi_sck,
  input  logic       spi_cs_n,
  input  logic       spi_mosi,
  output logic       spi_miso,
  output logic       rx_valid,
  output logic [7:0] rx_byte,
  input  logic [7:0] tx_byte
);

  // ---------------- SCK domain ----------------
  logic       frame_rst;
  logic [2:0] bit_cnt;
  logic [6:0] rx_sh;
  logic [7:0] rx_hold [2];
  logic       rx_tog;
  logic [7:0] tx_sh;

  assign frame_rst = spi_cs_n || !rst_n;

  always_ff @(posedge spi_sck or posedge frame_rst) begin
    if (frame_rst) begin
      bit_cnt <= '0;
      rx_sh   <= '0;
    end else begin
      bit_cnt <= bit_cnt + 3'd1;
      rx_sh   <= {rx_sh[5:0], spi_mosi};
    end
  end

  always_ff @(posedge spi_sck or negedge rst_n) begin
    if (!rst_n) begin
      rx_hold <= '{default: '0};
      rx_tog  <= 1'b0;
    end else if (!spi_cs_n && bit_cnt == 3'd7) begin
      rx_hold[rx_tog] <= {rx_sh, spi_mosi};
      rx_tog  <= !rx_tog;
    end
  end

  always_ff @(negedge spi_sck or posedge frame_rst) begin
    if (frame_rst)              tx_sh <= '0;
    else if (bit_cnt == 3'd0)   tx_sh <= tx_byte;
    else                        tx_sh <= {tx_sh[6:0], 1'b0};
  end

  assign spi_miso = tx_sh[7];

  // ---------------- core domain ----------------
  logic [2:0] tog_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tog_sync <= '0;
    else        tog_sync <= {tog_sync[1:0], rx_tog};
  end

  // a flip to value v announces the byte written to rx_hold[!v]
  assign rx_valid = tog_sync[2] ^ tog_sync[1];
  assign rx_byte  = rx_hold[tog_sync[2]];

endmodule
