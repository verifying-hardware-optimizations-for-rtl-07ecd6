// covoh_top: the three case-study datapaths side by side.
//
// The designs are independent of each other and share only the clock and
// reset; each keeps its own ports:
//   horner_*  Horner polynomial evaluator (combinational, degree HORNER_N)
//   rdr_*     partially pipelined right reduction of RDR_N XOR blocks in
//             RDR_K clusters (result RDR_K cycles after its operands, or
//             RDR_N cycles with RDR_OUT_CHAIN)
//   mon_*     avionics sliding-window monitor over 2^MON_N samples with
//             MON_N 32-bit operators, multipliers by default, adders with
//             MON_S_OP = S_ADD (combinational from mon_x to mon_y)
// Defaults are the sizes the designs were evaluated at: a cubic polynomial,
// a 128-block reduction (here fully pipelined, K = 128, the value the
// pipelining range ends at) and a 256-sample monitor.
module covoh_top
  import covoh_pkg::*;
#(
  parameter int unsigned HORNER_N      = 3,
  parameter int unsigned RDR_N         = 128,
  parameter int unsigned RDR_K         = 128,
  parameter bit          RDR_OUT_CHAIN = 1'b0,
  parameter int unsigned MON_N         = 8,
  parameter s_op_e       MON_S_OP      = S_MUL
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // Horner polynomial evaluator
  input  word_t                   horner_x,
  input  word_t [HORNER_N:0]      horner_a,
  output word_t                   horner_y,
  // partially pipelined XOR reduction
  input  logic  [RDR_N-1:0]       rdr_a,
  input  logic                    rdr_b,
  output logic                    rdr_y,
  // avionics monitor
  input  word_t                   mon_x,
  output word_t                   mon_y
);

  horner_poly #(.N(HORNER_N)) u_horner (
    .x(horner_x),
    .a(horner_a),
    .y(horner_y)
  );

  rdr_pipe #(.N(RDR_N), .K(RDR_K), .W(1), .OUT_CHAIN(RDR_OUT_CHAIN)) u_rdr (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (rdr_a),
    .b    (rdr_b),
    .y    (rdr_y)
  );

  avionics_monitor #(.N(MON_N), .S_OP(MON_S_OP)) u_mon (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (mon_x),
    .y    (mon_y)
  );

endmodule : covoh_top
