// cfq_otfc: OTFC, byte removal from the carry-save C register, with the alignment,
// carry and bit-stuffing rules of the Q-Coder.
//
// A shift counter ct counts the C shifts still to go before the next byte is complete;
// due is raised when it reaches 0 and the encoder then spends one cycle (extract) on the
// removal, in which no shift happens. In that cycle the pair is converted to
// conventional form, V = cs + cc, and, with k = P + S the position of the byte field:
//   - previous byte B = 0xFF: B is sent; the new B takes V[k+8:k+1], whose top bit is
//     the stuffed bit (it receives any carry into the 0xFF); V[k:0] stays; ct = 7;
//   - carry (V[k+8] = 1) and B + 1 = 0xFF: 0xFF is sent, the carry bit is cleared and the
//     byte is stuffed as above;
//   - carry otherwise: B + 1 is sent; B = V[k+7:k]; V[k-1:0] stays; ct = 8;
//   - no carry: B is sent; B = V[k+7:k]; V[k-1:0] stays; ct = 8.
// The first removal only fills B (nothing is sent). The remainder res is loaded back into
// the C pair with a zero carry vector. final_out sends the buffered B at the end of a
// flush. The count starts at 8 + S so that the first byte holds the first 8 code bits.
//
// Interface: byte_valid/byte_data are registered, one byte per cycle at most.
// Synchronous active-low reset.
//
// Origin: the published carry-free Q-Coder names this block and its duties (conversion of
// the emitted bytes to conventional form, alignment, bit stuffing as in the Q-Coder). How
// it does them is this design's choice: the full addition cs + cc in a dedicated removal
// cycle, which keeps it off the A path that sets the clock period, and the stuffed byte
// taken one position higher so its top bit catches the carry.
module cfq_otfc
  import cfqca_pkg::*;
#(
  parameter int unsigned P = P_FRAC,
  parameter int unsigned S = S_SPACER
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            shift,      // C is shifted this cycle
  input  logic            extract,    // remove a byte this cycle (only while due)
  input  logic            final_out,  // send the buffered byte (end of flush)
  input  logic [P+S+8:0]  cs,
  input  logic [P+S+8:0]  cc,
  output logic            due,        // a byte is complete in C
  output logic [P+S+8:0]  res,        // C after removal, conventional form
  output logic            byte_valid,
  output logic [7:0]      byte_data
);
  localparam int unsigned K = P + S;
  localparam int unsigned W = P + S + 9;

  logic [W-1:0]    v;
  logic [7:0]      b_q, b_next, out_b;
  logic            bvalid_q, send, stuff, carry;
  logic [CT_W-1:0] ct_q, ct_next;

  always_comb begin
    v      = cs + cc;           // conversion to conventional form
    carry  = v[K+8];
    stuff  = bvalid_q && ((b_q == 8'hFF) || (carry && b_q == 8'hFE));
    send   = bvalid_q;
    out_b  = (carry && !(b_q == 8'hFF)) ? b_q + 8'd1 : b_q;
    res    = '0;
    if (stuff) begin
      b_next  = {carry & (b_q == 8'hFF), v[K+7:K+1]};
      res[K:0] = v[K:0];
      ct_next = CT_W'(7);
    end else begin
      b_next  = v[K+7:K];
      res[K-1:0] = v[K-1:0];
      ct_next = CT_W'(8);
    end
    due = (ct_q == '0);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ct_q       <= CT_W'(S + 8);
      b_q        <= '0;
      bvalid_q   <= 1'b0;
      byte_valid <= 1'b0;
      byte_data  <= '0;
    end else begin
      byte_valid <= 1'b0;
      if (extract) begin
        b_q        <= b_next;
        bvalid_q   <= 1'b1;
        ct_q       <= ct_next;
        byte_valid <= send;
        byte_data  <= out_b;
      end else begin
        if (shift) ct_q <= ct_q - CT_W'(1);
        if (final_out && bvalid_q) begin
          byte_valid <= 1'b1;
          byte_data  <= b_q;
          bvalid_q   <= 1'b0;
        end
      end
    end
  end

  // no shift may pass a complete byte, and a removal needs one
  assert property (@(posedge clk) disable iff (!rst_n) due |-> !shift);
  assert property (@(posedge clk) disable iff (!rst_n) extract |-> due);
endmodule
