// vedic_mult: unsigned W x W multiplier built by the Urdhva Tiryakbhyam
// ("vertically and crosswise") method from AND gates, full adders and half adders.
//
// The product is formed column by column, from the least significant one, as in the
// step-by-step picture of the method: an 8-bit multiplier has 2*8-1 = 15 steps. Column k
// gathers the partial products a[i] & b[k-i] that line up vertically or cross over to
// position k, together with the carry bits handed on by column k-1. These bits are added
// by full adders, three at a time, and by one half adder when two are left. Bits are
// taken in arrival order and every sum goes back into the queue, so the adders form a
// tree inside the column. The last sum is product bit k. Every adder's carry becomes an
// input bit of column k+1. The top product bit is column 2W-1, which receives only the
// carries of column 2W-2. Because a*b < 2^(2W), the carries out of that column are
// always 0. They are left unconnected.
//
// Interface: a, b (W bits, unsigned) -> p (2W bits). Purely combinational, no clock.
// The column-wise method, the use of only AND gates, full adders and half adders, and
// the 8-bit default follow the published description. The order in which each column's
// bits meet the adders is this design's choice.
module vedic_mult #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // Number of partial products in column k.
  function automatic int n_and(input int k);
    if (k < 0 || k > 2 * int'(W) - 2) return 0;
    return (k < int'(W)) ? k + 1 : 2 * int'(W) - 1 - k;
  endfunction

  // Adders needed to reduce n bits to one: full adders (n-1)/2, plus a half adder when
  // n-1 is odd. Each adder sends one carry to the next column.
  function automatic int n_fa(input int n);
    return (n > 1) ? (n - 1) / 2 : 0;
  endfunction
  function automatic int n_ha(input int n);
    return (n > 1) ? (n - 1) % 2 : 0;
  endfunction

  // Number of bits entering column k: its partial products and the previous carries.
  function automatic int n_in(input int k);
    int n;
    n = 0;
    for (int c = 0; c <= k; c++) n = n_and(c) + n_fa(n) + n_ha(n);
    return n;
  endfunction

  for (genvar k = 0; k < 2 * int'(W); k++) begin : g_col
    localparam int NIN  = n_in(k);
    localparam int NFA  = n_fa(NIN);
    localparam int NHA  = n_ha(NIN);
    localparam int NADD = NFA + NHA;
    localparam int NAND = n_and(k);
    localparam int LO   = (k < int'(W)) ? 0 : k - int'(W) + 1;   // lowest a index

    // Queue of the column's bits: NIN inputs, then one sum per adder.
    wire [NIN+NADD-1:0]                 v;
    wire [((NADD > 0) ? NADD : 1)-1:0] cy;

    // vertical and crosswise partial products
    for (genvar i = 0; i < NAND; i++) begin : g_pp
      assign v[i] = a[LO+i] & b[k-LO-i];
    end
    // carries from the previous column
    if (k > 0) begin : g_cin
      for (genvar j = 0; j < NIN - NAND; j++) begin : g_c
        assign v[NAND+j] = g_col[k-1].cy[j];
      end
    end

    for (genvar j = 0; j < NFA; j++) begin : g_fa
      full_adder u_fa (.a(v[3*j]), .b(v[3*j+1]), .c(v[3*j+2]), .s(v[NIN+j]), .co(cy[j]));
    end
    if (NHA > 0) begin : g_ha
      half_adder u_ha (.a(v[3*NFA]), .b(v[3*NFA+1]), .s(v[NIN+NFA]), .co(cy[NFA]));
    end
    if (NADD == 0) begin : g_nocarry
      assign cy = 1'b0;
    end

    if (NIN > 0) begin : g_out
      assign p[k] = v[NIN+NADD-1];
    end else begin : g_zero
      assign p[k] = 1'b0;
    end
  end

endmodule
