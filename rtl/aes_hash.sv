// aes_hash: AES-128 encryption used as the hash that opens a garbled AND
// gate. The coprocessor encrypts the second input label under the first
// input label as key; the ciphertext is the one-time pad of the gate's
// truth-table row.
//
// The round function uses T-table lookups. The lookup memory has eight
// state ports, enough for half of the 16 state bytes per access, so one
// round takes two lookups (output columns 0-1, then 2-3) and, because
// the next round needs every byte of the finished state, one bubble
// cycle: three cycles per round. The round key is expanded on the fly
// during the same three cycles through four further lookup ports
// (SubWord). The last round takes the S-box byte out of the same table
// and skips MixColumns.
//
// Interface: pulse start with key and pt while busy=0. busy stays high
// for 30 cycles (10 rounds of 3); done pulses for one cycle as ct becomes
// valid, 30 cycles after the edge that took start, and ct holds until
// the next start.
// Half a round per lookup and table lookups in RAM follow the
// architecture; the key/plaintext roles of the two labels, the key
// schedule ports and the exact cycle count are this design's own.
module aes_hash
  import gc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  label_t key,
  input  label_t pt,
  output logic   busy,
  output logic   done,
  output label_t ct
);

  localparam int unsigned NPORTS = 12;

  logic [7:0]  rom_addr [NPORTS];
  logic [31:0] rom_data [NPORTS];

  aes_ttable_rom #(.NPORTS(NPORTS)) u_rom (
    .clk  (clk),
    .addr (rom_addr),
    .data (rom_data)
  );

  logic [127:0] st, rk;
  logic [3:0]   round;   // 1..10
  logic [1:0]   phase;   // 0: look up cols 0-1, 1: cols 2-3, 2: combine
  logic [63:0]  t01;     // new columns 0-1, before AddRoundKey
  logic [31:0]  sub;     // SubWord(RotWord(w3)) of the current round key

  // byte k of a 128-bit block, k = 0 is the first (most significant) byte
  function automatic logic [7:0] byte_of(input logic [127:0] v, input int k);
    return v[127 - 8*k -: 8];
  endfunction

  function automatic logic [7:0] rcon(input logic [3:0] r);
    logic [7:0] c;
    c = 8'h01;
    for (int i = 1; i < 10; i++) if (i < int'(r)) c = {c[6:0], 1'b0} ^ (c[7] ? 8'h1b : 8'h00);
    return c;
  endfunction

  // One output column from four table words: T0 ^ T1 ^ T2 ^ T3, where
  // Tn is T0 rotated right by n bytes; the last round keeps only S-boxes.
  function automatic logic [31:0] column(input logic [31:0] w0, input logic [31:0] w1,
                                         input logic [31:0] w2, input logic [31:0] w3,
                                         input logic last);
    if (last)
      return {w0[23:16], w1[23:16], w2[23:16], w3[23:16]};
    return w0 ^ {w1[7:0], w1[31:8]} ^ {w2[15:0], w2[31:16]} ^ {w3[23:0], w3[31:24]};
  endfunction

  // Lookup addresses: output column c needs state byte (row r, column
  // c+r) after ShiftRows, i.e. byte 4*((c+r)%4)+r.
  always_comb begin
    for (int i = 0; i < 8; i++) begin
      int c, r;
      c = i / 4 + ((phase == 2'd1) ? 2 : 0);
      r = i % 4;
      rom_addr[i] = byte_of(st, 4 * ((c + r) % 4) + r);
    end
    // RotWord of w3 = bytes 13, 14, 15, 12
    rom_addr[8]  = byte_of(rk, 13);
    rom_addr[9]  = byte_of(rk, 14);
    rom_addr[10] = byte_of(rk, 15);
    rom_addr[11] = byte_of(rk, 12);
  end

  logic         last;
  logic [63:0]  t23;
  logic [127:0] rk_next;

  always_comb begin
    logic [31:0] w0, w1, w2, w3;
    last = (round == 4'd10);
    t23  = {column(rom_data[0], rom_data[1], rom_data[2], rom_data[3], last),
            column(rom_data[4], rom_data[5], rom_data[6], rom_data[7], last)};
    w0 = rk[127:96] ^ sub ^ {rcon(round), 24'h0};
    w1 = rk[95:64] ^ w0;
    w2 = rk[63:32] ^ w1;
    w3 = rk[31:0]  ^ w2;
    rk_next = {w0, w1, w2, w3};
  end

  assign ct = st;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= '0;
      rk    <= '0;
      round <= '0;
      phase <= '0;
      t01   <= '0;
      sub   <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          st    <= pt ^ key;
          rk    <= key;
          round <= 4'd1;
          phase <= 2'd0;
          busy  <= 1'b1;
        end
      end else begin
        unique case (phase)
          2'd0: phase <= 2'd1;
          2'd1: begin
            t01   <= t23;   // the port 0-7 results are columns 0-1 here
            sub   <= {rom_data[8][23:16], rom_data[9][23:16],
                      rom_data[10][23:16], rom_data[11][23:16]};
            phase <= 2'd2;
          end
          default: begin
            st    <= {t01, t23} ^ rk_next;
            rk    <= rk_next;
            phase <= 2'd0;
            if (round == 4'd10) begin
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              round <= round + 4'd1;
            end
          end
        endcase
      end
    end
  end

endmodule
