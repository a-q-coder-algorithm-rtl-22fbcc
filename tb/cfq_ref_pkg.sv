// cfq_ref_pkg: untimed reference models of the carry-free Q-Coder for the testbenches.
//
// The A part is modelled bit for bit (sum/carry vectors, estimate, one shift per step),
// because encoder and decoder must reproduce its exact normalization decisions. The C
// part is modelled with plain integer arithmetic on the exact value of C (no carry-save
// form), and the byte removal, carry and stuffing rules are written out on that value.
// The decoder model rebuilds the code value from the byte string and decodes by exact
// comparison. Sizes follow cfqca_pkg.
package cfq_ref_pkg;
  import cfqca_pkg::*;

  localparam int K = P_FRAC + S_SPACER;

  typedef struct {
    logic [P_FRAC+1:0] s, c;
  } apair_t;

  function automatic logic [P_FRAC+1:0] maj3(logic [P_FRAC+1:0] a, b, d);
    return (a & b) | (a & d) | (b & d);
  endfunction

  // one cycle of the A part: kind 0 = MPS, 1 = LPS, 2 = normalization-only cycle;
  // t is the number of fraction bits of the estimate (t = P_FRAC: exact test)
  function automatic bit a_cycle(ref apair_t a, input int kind, input logic [P_FRAC-1:0] qe,
                                 input int t = T_EST);
    logic [P_FRAC+1:0] q, s1, c1;
    int est;
    bit h;
    if (kind == 1) begin
      s1 = {2'b00, qe};
      c1 = '0;
    end else begin
      q  = (kind == 0) ? ~{2'b00, qe} : '0;
      s1 = a.s ^ a.c ^ q;
      c1 = {maj3(a.s, a.c, q)[P_FRAC:0], kind == 0};
    end
    est = ((int'(s1) >> (P_FRAC - t)) + (int'(c1) >> (P_FRAC - t))) % (1 << (t + 2));
    h = (est < (1 << t));
    a.s = h ? s1 << 1 : s1;
    a.c = h ? c1 << 1 : c1;
    return h;
  endfunction

  function automatic longint a_value(apair_t a);
    return longint'((a.s + a.c) & ((1 << (P_FRAC + 2)) - 1));
  endfunction

  class ref_encoder;
    apair_t   a;
    longint   v;         // exact C
    int       ct;
    int       b;         // buffered byte, -1 = none
    byte unsigned out[$];
    longint   cycles;    // cycles the RTL needs, up to the flush request
    int       n_shift, n_extract, n_carry, n_stuff, n_carry_ff, n_extra;
    int       t_est;     // estimate precision used for the normalization test

    function new(int t = T_EST);
      t_est = t;
      a.s = 1 << P_FRAC; a.c = 0; v = 0; ct = 8 + S_SPACER; b = -1;
      cycles = 0; n_shift = 0; n_extract = 0; n_carry = 0; n_stuff = 0; n_carry_ff = 0;
      n_extra = 0;
    endfunction

    function void byte_out();
      n_extract++;
      cycles++;
      if (b == 255) begin
        out.push_back(8'hFF);
        n_stuff++;
        b  = int'(v >> (K + 1));
        v  = v % (longint'(1) << (K + 1));
        ct = 7;
      end else begin
        if (v >= (longint'(1) << (K + 8))) begin
          n_carry++;
          b++;
          v -= longint'(1) << (K + 8);
        end
        if (b == 255) begin
          n_carry_ff++;
          n_stuff++;
          out.push_back(8'hFF);
          b  = int'(v >> (K + 1));
          v  = v % (longint'(1) << (K + 1));
          ct = 7;
        end else begin
          if (b >= 0) out.push_back(8'(b));
          b  = int'(v >> K);
          v  = v % (longint'(1) << K);
          ct = 8;
        end
      end
    endfunction

    function void shift_c();
      v = v * 2;
      n_shift++;
      ct--;
      if (ct == 0) byte_out();
    endfunction

    function void encode(bit lps, logic [P_FRAC-1:0] qe);
      bit h;
      cycles++;
      if (!lps) v += qe;
      h = a_cycle(a, lps ? 1 : 0, qe, t_est);
      if (h) shift_c();
      while (h) begin
        h = a_cycle(a, 2, qe, t_est);
        cycles++;
        n_extra++;
        if (h) shift_c();
      end
    endfunction

    function void flush();
      int n = flush_extracts(P_FRAC, S_SPACER);
      for (int i = 0; i < n; i++) begin
        int e = n_extract;
        while (n_extract == e) shift_c();
      end
      if (b >= 0) out.push_back(8'(b));
    endfunction
  endclass

  class ref_decoder;
    apair_t a;
    longint d;        // code value minus C, with 16 look-ahead bits
    int     pos;      // next byte to read
    int     fill;     // shifts left before the next byte is needed
    bit     last_ff;
    byte unsigned code[$];

    function new(byte unsigned bytes[$]);
      code = bytes;
      a.s = 1 << P_FRAC; a.c = 0;
      d = 0; pos = 0; last_ff = 0; fill = 0;
      // the first code bit has weight 1/2: place 16 + P_FRAC bits before decoding
      for (int i = 0; i < P_FRAC + 8; i++) shift_d(0);
    endfunction

    function int next_byte();
      int x = (pos < code.size()) ? int'(code[pos]) : 0;
      pos++;
      return x;
    endfunction

    // shift D once, first reading a byte into the low bits when they are used up
    function void shift_d(bit doshift);
      if (fill == 0) begin
        int x = next_byte();
        if (last_ff) begin
          d += longint'(x) << 1;
          fill = 7;
        end else begin
          d += longint'(x);
          fill = 8;
        end
        last_ff = (x == 255);
      end
      d = d * 2;
      fill--;
    endfunction

    function bit decode(logic [P_FRAC-1:0] qe);
      bit lps, h;
      longint q16 = longint'(qe) << 16;
      lps = (d < q16);
      if (!lps) d -= q16;
      h = a_cycle(a, lps ? 1 : 0, qe);
      if (h) shift_d(1);
      while (h) begin
        h = a_cycle(a, 2, qe);
        if (h) shift_d(1);
      end
      return lps;
    endfunction
  endclass
endpackage
