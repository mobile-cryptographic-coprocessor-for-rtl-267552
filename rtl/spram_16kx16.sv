// spram_16kx16: one 256-kbit single-port on-chip SRAM block, 16384 words
// of 16 bits, with the pin set of the iCE40 UP5K SPRAM macro.
//
// It is written as a plain array so that it simulates and synthesizes
// anywhere; on the UP5K a synthesis tool maps it onto one SPRAM block.
// Timing: synchronous. A read (cs=1, wren=0) presents mem[address] on
// dataout after the clock edge; a write (cs=1, wren=1) stores the
// nibbles of datain whose maskwren bit is 1. dataout holds its value
// when no read happens. standby and sleep block every access; sleep also
// clears dataout, and poweroff=0 (active low) blocks access as the
// real part does. The low-power modes are present because the real part
// has them; the coprocessor keeps the block awake.
module spram_16kx16 (
  input  logic        clock,
  input  logic [13:0] address,
  input  logic [15:0] datain,
  input  logic [3:0]  maskwren,
  input  logic        wren,
  input  logic        chipselect,
  input  logic        standby,
  input  logic        sleep,
  input  logic        poweroff,   // active low: 1 = powered
  output logic [15:0] dataout
);

  logic [15:0] mem [16384];

  logic active;
  assign active = chipselect && !standby && !sleep && poweroff;

  always_ff @(posedge clock) begin
    if (active && wren) begin
      for (int n = 0; n < 4; n++)
        if (maskwren[n]) mem[address][4*n +: 4] <= datain[4*n +: 4];
    end
  end

  always_ff @(posedge clock) begin
    if (sleep || !poweroff)          dataout <= '0;
    else if (active && !wren)        dataout <= mem[address];
  end

endmodule
