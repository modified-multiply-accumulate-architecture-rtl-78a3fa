// SPSIT-equipped carry-save adder row (3:2 compressor with a frozen MSP).
//
// Reduces x, y, z to sum and carry rows with x + y + z = sum + carry
// (mod 2^W), like csa_3to2, but the row is split into an LSP of LSP_W bits
// and an MSP of the rest. When the MSP of every input is pure sign extension
// (all zeros or all ones), each MSP full adder would see the same three sign
// bits sx, sy, sz, so its outputs are known: the sum bits are sx^sy^sz and
// the carry bits are the majority of the three. The asserted 'close' signal
// then makes latches hold the MSP full adders' inputs, so they do not switch,
// and the known bits are driven instead. The lowest MSP carry bit always
// comes from the top LSP full adder, which keeps working.
//
// Interface: x, y, z combinational in, sum and carry combinational out;
// clk, rst_n and assert_en feed the asserting logic (spsit_assert, style
// STYLE; with the register style the controls are sampled on the falling
// edge, so this block must be the only falling-edge-asserted SPSIT stage on
// its register-to-register path). close reports the asserted close signal.
// The latches are intended. Applying the adder-splitting technique to a
// carry-save row in this way, and the latching of the three MSP inputs, is
// this design's own form of the technique.
module spsit_csa
  import spsit_pkg::*;
#(
  parameter int unsigned   W     = 32,
  parameter int unsigned   LSP_W = 16,
  parameter assert_style_e STYLE = ASSERT_AND
)(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         assert_en,
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry,
  output logic         close
);

  localparam int unsigned MSP_W = W - LSP_W;

  // Detection logic: {close, carr_ctrl, sx, sy, sz}.
  logic [4:0] raw, ctl;
  logic       carr_ctrl, sx, sy, sz;

  always_comb begin
    logic ext;
    ext = (x[W-1:LSP_W] == '0 || x[W-1:LSP_W] == '1) &&
          (y[W-1:LSP_W] == '0 || y[W-1:LSP_W] == '1) &&
          (z[W-1:LSP_W] == '0 || z[W-1:LSP_W] == '1);
    raw = {ext, ext, x[W-1], y[W-1], z[W-1]};
  end

  spsit_assert #(.N(5), .STYLE(STYLE)) u_assert (
    .clk       (clk),
    .rst_n     (rst_n),
    .assert_en (assert_en),
    .load      (1'b1),
    .raw       (raw),
    .asserted  (ctl)
  );

  assign {close, carr_ctrl, sx, sy, sz} = ctl;

  // LSP full adders: always active.
  logic [LSP_W-1:0] sum_lsp, maj_lsp;

  always_comb begin
    sum_lsp = x[LSP_W-1:0] ^ y[LSP_W-1:0] ^ z[LSP_W-1:0];
    maj_lsp = (x[LSP_W-1:0] & y[LSP_W-1:0]) | (x[LSP_W-1:0] & z[LSP_W-1:0]) |
              (y[LSP_W-1:0] & z[LSP_W-1:0]);
  end

  // Latches in front of the MSP full adders.
  logic [MSP_W-1:0] x_lat, y_lat, z_lat;

  always_latch begin
    if (!close) begin
      x_lat = x[W-1:LSP_W];
      y_lat = y[W-1:LSP_W];
      z_lat = z[W-1:LSP_W];
    end
  end

  // MSP full adders (their top carry falls off, mod 2^W).
  logic [MSP_W-1:0] sum_msp;
  logic [MSP_W-2:0] maj_msp;

  always_comb begin
    sum_msp = x_lat ^ y_lat ^ z_lat;
    maj_msp = (x_lat[MSP_W-2:0] & y_lat[MSP_W-2:0]) | (x_lat[MSP_W-2:0] & z_lat[MSP_W-2:0]) |
              (y_lat[MSP_W-2:0] & z_lat[MSP_W-2:0]);
  end

  // Sign-extension outputs and selection.
  logic par_s, maj_s;
  assign par_s = sx ^ sy ^ sz;
  assign maj_s = (sx & sy) | (sx & sz) | (sy & sz);

  assign sum   = {carr_ctrl ? {MSP_W{par_s}} : sum_msp, sum_lsp};
  assign carry = {carr_ctrl ? {(MSP_W-1){maj_s}} : maj_msp, maj_lsp, 1'b0};

endmodule
