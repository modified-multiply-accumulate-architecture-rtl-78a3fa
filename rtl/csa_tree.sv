// Carry-save partial product reduction tree (Wallace tree).
//
// Reduces N_ROWS rows of W bits to one sum row and one carry row whose total
// equals the total of the inputs (mod 2^W). Each level groups the rows by
// three into csa_3to2 compressors and passes the one or two leftover rows on,
// so the row count goes 8 -> 6 -> 4 -> 3 -> 2 for the eight Booth partial
// products of a 16x16 multiplier: four full-adder delays. The tree is
// generated from N_ROWS, which must be at least 2; it holds N_ROWS-2
// compressors.
//
// With SPSIT_LSP_W > 0 every compressor is an SPSIT-equipped one (spsit_csa)
// split at SPSIT_LSP_W: its upper part is frozen whenever all three of its
// inputs are sign extension there, which happens when the operands of the
// multiplier are small. close reports, per compressor (numbered level by
// level), whether it is frozen. With SPSIT_LSP_W = 0 plain csa_3to2 rows are
// used, close is all zeros and clk, rst_n and assert_en are unused.
// Otherwise purely combinational apart from the asserting logic (see
// spsit_assert; the register style can only be used where this tree is the
// single falling-edge-asserted SPSIT stage between two registers).
// Replacing every compressor and splitting all of them at the same bit are
// this design's choices.
module csa_tree
  import spsit_pkg::*;
#(
  parameter int unsigned   W           = 32,
  parameter int unsigned   N_ROWS      = 8,
  parameter int unsigned   SPSIT_LSP_W = 16,
  parameter assert_style_e STYLE       = ASSERT_AND,
  localparam int unsigned  NC          = (N_ROWS > 2) ? N_ROWS - 2 : 1
)(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          assert_en,
  input  logic [W-1:0]  rows [N_ROWS],
  output logic [W-1:0]  sum,
  output logic [W-1:0]  carry,
  output logic [NC-1:0] close
);

  function automatic int unsigned rows_after(int unsigned n);
    return (n / 3) * 2 + (n % 3);
  endfunction

  function automatic int unsigned rows_at(int unsigned level);
    int unsigned n;
    n = N_ROWS;
    for (int unsigned l = 0; l < level; l++) n = rows_after(n);
    return n;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned n, l;
    n = N_ROWS;
    l = 0;
    while (n > 2) begin
      n = rows_after(n);
      l++;
    end
    return l;
  endfunction

  // Number of compressors in the levels before 'level'.
  function automatic int unsigned csa_offset(int unsigned level);
    int unsigned n, o;
    n = N_ROWS;
    o = 0;
    for (int unsigned l = 0; l < level; l++) begin
      o += n / 3;
      n = rows_after(n);
    end
    return o;
  endfunction

  localparam int unsigned NLEV = num_levels();

  logic [NC-1:0] close_w;
  assign close = close_w;
  if (N_ROWS <= 2 || SPSIT_LSP_W == 0) begin : g_no_close
    assign close_w = '0;
  end

  // Level l of the generate loop holds the rows after l+1 reduction steps;
  // level 0 input is the module input.
  for (genvar l = 0; l < NLEV; l++) begin : g_level
    localparam int unsigned R  = rows_at(l);
    localparam int unsigned G  = R / 3;
    localparam int unsigned RN = rows_after(R);
    localparam int unsigned O  = csa_offset(l);
    logic [W-1:0] din  [R];
    logic [W-1:0] dout [RN];
    if (l == 0) begin : g_first
      assign din = rows;
    end else begin : g_next
      assign din = g_level[l-1].dout;
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      if (SPSIT_LSP_W > 0) begin : g_spsit
        spsit_csa #(.W(W), .LSP_W(SPSIT_LSP_W), .STYLE(STYLE)) u_csa (
          .clk       (clk),
          .rst_n     (rst_n),
          .assert_en (assert_en),
          .x         (din[3*g]),
          .y         (din[3*g+1]),
          .z         (din[3*g+2]),
          .sum       (dout[2*g]),
          .carry     (dout[2*g+1]),
          .close     (close_w[O+g])
        );
      end else begin : g_plain
        csa_3to2 #(.W(W)) u_csa (
          .x     (din[3*g]),
          .y     (din[3*g+1]),
          .z     (din[3*g+2]),
          .sum   (dout[2*g]),
          .carry (dout[2*g+1])
        );
      end
    end
    for (genvar k = 0; k < R % 3; k++) begin : g_pass
      assign dout[2*G+k] = din[3*G+k];
    end
  end

  if (NLEV == 0) begin : g_none
    assign sum   = rows[0];
    assign carry = rows[1];
  end else begin : g_out
    assign sum   = g_level[NLEV-1].dout[0];
    assign carry = g_level[NLEV-1].dout[1];
  end

endmodule
