// aes_ttable_rom: AES T-table lookup memory with NPORTS registered read
// ports.
//
// Every port reads the same 256 x 32 table T0[x] = {2*S(x), S(x), S(x),
// 3*S(x)} (bytes from most to least significant, products in GF(2^8)
// modulo x^8+x^4+x^3+x+1). The other three T-tables are byte rotations of
// T0, and the plain S-box value is byte 2 of the word (bits 23:16), so
// the one table serves the rounds, the last round and the key schedule.
// Eight ports cover half of the AES state in one access; four more serve
// the key schedule. The table is computed from its definition when the
// memory is initialised (S(x) = affine transform of the multiplicative
// inverse of x), so no data file is needed.
// Timing: data[i] is T0[addr[i]] one clock after addr[i] is presented.
// Lookup tables in block RAM follow the architecture; the port count and
// the single shared table are this design's choices.
module aes_ttable_rom #(
  parameter int unsigned NPORTS = 12
) (
  input  logic              clk,
  input  logic [7:0]        addr [NPORTS],
  output logic [31:0]       data [NPORTS]
);

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] inv, s, base;
    logic [7:0] e;
    // a^254 is the inverse in GF(2^8), and maps 0 to 0 (square and multiply)
    inv  = 8'h01;
    base = a;
    e    = 8'd254;
    for (int i = 0; i < 8; i++) begin
      if (e[i]) inv = gmul(inv, base);
      base = gmul(base, base);
    end
    s = inv;
    for (int i = 1; i <= 4; i++) s ^= (inv << i) | (inv >> (8 - i));
    return s ^ 8'h63;
  endfunction

  function automatic logic [31:0] tword(input logic [7:0] x);
    logic [7:0] s;
    s = sbox(x);
    return {xtime(s), s, s, xtime(s) ^ s};
  endfunction

  logic [31:0] table0 [256];

  initial begin
    for (int x = 0; x < 256; x++) table0[x] = tword(8'(x));
  end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NPORTS; i++) data[i] <= table0[addr[i]];
  end

endmodule
