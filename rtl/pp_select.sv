// pp_select: point-and-permute row selection with row reduction for one
// garbled AND gate.
//
// The color bits of the two input labels (their least significant bits)
// form the row pointer {color(A), color(B)}. Row 0's ciphertext is zero
// by construction and is never sent, so the gate's output label is the
// hash itself when the pointer is 0. Rows 1..3 arrive in order as
// ciphertexts; the one whose index equals the pointer is held, and the
// output label is hash XOR that ciphertext. The result becomes valid as
// soon as both the hash and the needed ciphertext are present, in
// whichever order they come.
//
// Interface: clear starts a new gate. ptr_valid (one cycle) delivers the
// two color bits; it must come before the first ct_valid. ct_valid with
// ct_idx in 1..3 delivers one ciphertext; hash_valid delivers the hash.
// result_valid rises one cycle after the last needed input and stays
// high, with result, until clear.
// Color bits, the pointer and row reduction follow the protocol; which
// label gives the pointer's upper bit is this design's choice.
module pp_select
  import gc_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   ptr_valid,
  input  logic   color_a,
  input  logic   color_b,
  input  logic   ct_valid,
  input  row_t   ct_idx,
  input  label_t ct,
  input  logic   hash_valid,
  input  label_t hash,
  output logic   result_valid,
  output label_t result
);

  row_t   ptr;
  logic   have_ptr, have_ct, have_hash;
  label_t ct_q, hash_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr          <= '0;
      have_ptr     <= 1'b0;
      have_ct      <= 1'b0;
      have_hash    <= 1'b0;
      ct_q         <= '0;
      hash_q       <= '0;
      result_valid <= 1'b0;
      result       <= '0;
    end else if (clear) begin
      have_ptr     <= 1'b0;
      have_ct      <= 1'b0;
      have_hash    <= 1'b0;
      result_valid <= 1'b0;
    end else begin
      if (ptr_valid) begin
        ptr      <= {color_a, color_b};
        have_ptr <= 1'b1;
        if ({color_a, color_b} == 2'd0) begin
          ct_q    <= '0;    // row 0: implicit all-zero ciphertext
          have_ct <= 1'b1;
        end
      end
      if (ct_valid && have_ptr && ct_idx == ptr) begin
        ct_q    <= ct;
        have_ct <= 1'b1;
      end
      if (hash_valid) begin
        hash_q    <= hash;
        have_hash <= 1'b1;
      end
      if (have_ct && have_hash && !result_valid) begin
        result       <= hash_q ^ ct_q;
        result_valid <= 1'b1;
      end
    end
  end

  // A ciphertext must never arrive before the pointer is known.
  assert property (@(posedge clk) disable iff (!rst_n) ct_valid && !clear |-> have_ptr)
    else $error("pp_select: ciphertext before pointer");

endmodule
