// Approximate arithmetic unit with run-time reconfigurable accuracy.
//
// Holds the two reconfigurable adders of the design side by side, each with its own ports:
//   * rca_*: an RCA_W-bit (8) ripple-carry adder/subtractor of dual-mode full adders;
//   * cla_*: a CLA_W-bit (16) carry-lookahead adder of dual-mode lookahead blocks.
// Each adder has its own degree-of-approximation input (rca_da, cla_da): the number of
// least significant bit positions computed approximately. Changing it between operations
// reconfigures the adder on the fly; 0 makes it exact. The two adders share nothing.
//
// Interface (all combinational, no clock or reset):
//   rca_a, rca_b [RCA_W-1:0], rca_cin, rca_sub, rca_da -> rca_sum [RCA_W-1:0], rca_cout
//   cla_a, cla_b [CLA_W-1:0], cla_cin, cla_da          -> cla_sum [CLA_W-1:0], cla_cout,
//                                                         cla_grp_p, cla_grp_g
module approx_arith_unit #(
  parameter int unsigned RCA_W  = 8,
  parameter int unsigned CLA_W  = 16,
  parameter int unsigned RCA_DW = $clog2(RCA_W + 1),
  parameter int unsigned CLA_DW = $clog2(CLA_W + 1)
) (
  input  logic [RCA_W-1:0]  rca_a,
  input  logic [RCA_W-1:0]  rca_b,
  input  logic              rca_cin,
  input  logic              rca_sub,
  input  logic [RCA_DW-1:0] rca_da,
  output logic [RCA_W-1:0]  rca_sum,
  output logic              rca_cout,

  input  logic [CLA_W-1:0]  cla_a,
  input  logic [CLA_W-1:0]  cla_b,
  input  logic              cla_cin,
  input  logic [CLA_DW-1:0] cla_da,
  output logic [CLA_W-1:0]  cla_sum,
  output logic              cla_cout,
  output logic              cla_grp_p,
  output logic              cla_grp_g
);
  rab_rca #(.N(RCA_W), .DW(RCA_DW)) u_rca (
    .a   (rca_a),
    .b   (rca_b),
    .cin (rca_cin),
    .sub (rca_sub),
    .da  (rca_da),
    .sum (rca_sum),
    .cout(rca_cout)
  );

  rab_cla #(.N(CLA_W), .DW(CLA_DW)) u_cla (
    .a    (cla_a),
    .b    (cla_b),
    .cin  (cla_cin),
    .da   (cla_da),
    .sum  (cla_sum),
    .cout (cla_cout),
    .grp_p(cla_grp_p),
    .grp_g(cla_grp_g)
  );
endmodule
