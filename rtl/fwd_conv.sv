// fwd_conv: conversion engine for one modulus. It turns a complex integer
// a + jb into the two QRNS channels (z, z*) in number-theoretic log form.
//
//   ra = a mod p, rb = b mod p         (residues of the signed integers)
//   z  = ra + j^ rb  (mod p)            (j^ solves j^2 = -1 mod p)
//   z* = ra - j^ rb  (mod p)
//   z_log = log_alpha(z), zs_log = log_alpha(z*), or the zero code for 0
//
// The mapping and the log conversion are the paper's. The paper names
// a conversion engine but not its insides, so the arithmetic here is the
// simplest that does it. Each residue is an offset-and-modulo: a multiple of
// p at least 2^(IN_W-1) is added, so the operand is never negative. The
// logarithm is two nt_log tables. The input width IN_W is this design's
// choice.
//
// Interface: re, im (signed IN_W bits) in; z_log, zs_log out. Purely
// combinational.
module fwd_conv #(
  parameter int unsigned P     = 113,
  parameter int unsigned ALPHA = 3,
  parameter int unsigned DW    = 7,
  parameter int unsigned IN_W  = 8
) (
  input  logic signed [IN_W-1:0] re,
  input  logic signed [IN_W-1:0] im,
  output logic        [DW-1:0]   z_log,
  output logic        [DW-1:0]   zs_log
);

  localparam int unsigned J   = gauss_pkg::jhat(P);
  localparam int unsigned OFF = P * ((2**(IN_W-1) + P - 1) / P);
  localparam int unsigned UW  = IN_W + DW + 1;   // holds a + OFF without overflow

  logic [UW-1:0]   ua, ub;
  logic [DW-1:0]   ra, rb, z, zs;
  logic [2*DW+1:0] jb, tz, tzs;

  always_comb begin
    ua  = UW'($signed(UW'(re)) + $signed(UW'(OFF)));
    ub  = UW'($signed(UW'(im)) + $signed(UW'(OFF)));
    ra  = DW'(ua % UW'(P));
    rb  = DW'(ub % UW'(P));
    jb  = (2*DW+2)'(rb) * (2*DW+2)'(J);
    tz  = (2*DW+2)'(ra) + jb;
    tzs = (2*DW+2)'(ra) + (2*DW+2)'(P) * (2*DW+2)'(P) - jb;
    z   = DW'(tz % (2*DW+2)'(P));
    zs  = DW'(tzs % (2*DW+2)'(P));
  end

  nt_log #(.P(P), .ALPHA(ALPHA), .DW(DW)) u_log_z  (.x(z),  .e(z_log));
  nt_log #(.P(P), .ALPHA(ALPHA), .DW(DW)) u_log_zs (.x(zs), .e(zs_log));

endmodule
