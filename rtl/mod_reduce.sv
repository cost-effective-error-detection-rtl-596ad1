// mod_reduce: Wallace-tree-like reduction of a wide vector to its residue
// modulo M = 2^N - 1.
//
// Bit i of the input has weight 2^i = 2^(i mod N) (mod M), so the input is
// first sorted into N columns. Then, stage after stage, every column that
// holds three or more bits feeds groups of three bits into full adders: the
// sum bit stays in the column, the carry bit moves to the next column, and
// the carry out of column N-1 wraps around to column 0. Each full adder
// removes exactly one bit, so the cost is fixed by the input width, and the
// structure is the same for any Mersenne base. Reduction stops when every
// column holds at most two bits: those form the 2N-bit carry-save result
// (cs_a + cs_b = in, mod M). A final end-around-carry adder (mod_add) turns
// it into the N-bit, non-normalized residue res.
//
// The number of stages and the bit layout of every stage are computed at
// elaboration by constant functions. Within a column of stage s+1 the bits
// are laid out as: sums of that column's full adders, bits passed through
// unchanged, then carries arriving from the previous column.
//
// Interface: in (WIN bits, bit i weighing 2^i); cs_a, cs_b (carry-save
// residue); res (N-bit residue). Purely combinational.
module mod_reduce #(
  parameter int unsigned N   = msd_pkg::MSD_N,
  parameter int unsigned WIN = msd_pkg::MSD_W
) (
  input  logic [WIN-1:0] in,
  output logic [N-1:0]   cs_a,
  output logic [N-1:0]   cs_b,
  output logic [N-1:0]   res
);

  // Number of bits in column c at stage s.
  function automatic int cnt_at(int s, int c);
    int cur[N];
    int nxt[N];
    for (int k = 0; k < int'(N); k++)
      cur[k] = int'(WIN / N) + ((k < int'(WIN % N)) ? 1 : 0);
    for (int st = 0; st < s; st++) begin
      for (int k = 0; k < int'(N); k++)
        nxt[k] = cur[k] / 3 + cur[k] % 3 + cur[(k + int'(N) - 1) % int'(N)] / 3;
      cur = nxt;
    end
    return cur[c];
  endfunction

  // Bit offset of column c within the stage-s vector.
  function automatic int off_at(int s, int c);
    int o = 0;
    for (int k = 0; k < c; k++) o += cnt_at(s, k);
    return o;
  endfunction

  // Total width of the stage-s vector.
  function automatic int tot_at(int s);
    return off_at(s, int'(N));
  endfunction

  // Number of full-adder stages: first stage with no column above two bits.
  function automatic int num_stages();
    int s = 0;
    bit busy = 1'b1;
    while (busy) begin
      busy = 1'b0;
      for (int k = 0; k < int'(N); k++)
        if (cnt_at(s, k) > 2) busy = 1'b1;
      if (busy) s++;
    end
    return s;
  endfunction

  localparam int NST = num_stages();

  for (genvar s = 0; s <= NST; s++) begin : g_st
    logic [tot_at(s)-1:0] v;
    if (s == 0) begin : g_in
      // Stage 0 in column-major order: column c holds bits c, c+N, c+2N, ...
      for (genvar c = 0; c < N; c++) begin : g_col
        for (genvar j = 0; j < cnt_at(0, c); j++) begin : g_bit
          assign v[off_at(0, c) + j] = in[c + j*N];
        end
      end
    end else begin : g_fa
      for (genvar c = 0; c < N; c++) begin : g_col
        localparam int CN  = (c + 1) % N;          // column receiving carries
        localparam int CI  = cnt_at(s-1, c);       // bits entering this column
        localparam int F   = CI / 3;               // full adders in this column
        localparam int R   = CI % 3;               // bits passed through
        localparam int IO  = off_at(s-1, c);       // input offset
        localparam int OO  = off_at(s, c);         // output offset (sums)
        // carries land after the sums and pass-through bits of column CN
        localparam int CO  = off_at(s, CN) + cnt_at(s-1, CN) / 3 + cnt_at(s-1, CN) % 3;
        for (genvar k = 0; k < F; k++) begin : g_add
          full_adder u_fa (
            .a (g_st[s-1].v[IO + 3*k]),
            .b (g_st[s-1].v[IO + 3*k + 1]),
            .ci(g_st[s-1].v[IO + 3*k + 2]),
            .s (v[OO + k]),
            .co(v[CO + k])
          );
        end
        for (genvar k = 0; k < R; k++) begin : g_pass
          assign v[OO + F + k] = g_st[s-1].v[IO + 3*F + k];
        end
      end
    end
  end

  // Carry-save output: at most two bits per column remain.
  always_comb begin
    for (int c = 0; c < int'(N); c++) begin
      cs_a[c] = (cnt_at(NST, c) >= 1) ? g_st[NST].v[off_at(NST, c)]     : 1'b0;
      cs_b[c] = (cnt_at(NST, c) >= 2) ? g_st[NST].v[off_at(NST, c) + 1] : 1'b0;
    end
  end

  mod_add #(.N(N)) u_final (.a(cs_a), .b(cs_b), .s(res));

endmodule
