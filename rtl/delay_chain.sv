// delay_chain: DEPTH delay elements in series, D^DEPTH.
//
// A W-bit shift register of DEPTH stages: dout(t) = din(t - DEPTH). With
// DEPTH = 0 it is a plain wire (D^0 = id). Every stage is a bank of W D-type
// flip-flops clocked on the rising edge of clk.
//
// Reset (asynchronous, active low) loads every stage with RESET_VAL. The
// document models D as a pure delay and does not say what a register holds
// before the first sample; the reset value is this implementation's choice
// and users pick it per instance (the avionics monitor uses the identity of
// its operator, so partially filled windows stay well defined).
//
// With DEPTH = 0 the clock and reset inputs are kept, for a uniform
// interface, but left unused, and lint reports them as such.
//
// Ports:  clk, rst_n   clock, asynchronous active-low reset
//         din, dout    W-bit data in and out, latency DEPTH cycles
module delay_chain #(
  parameter int unsigned W         = 32,
  parameter int unsigned DEPTH     = 1,
  parameter logic [W-1:0] RESET_VAL = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_regs
    logic [W-1:0] stage [DEPTH];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(DEPTH); i++) stage[i] <= RESET_VAL;
      end else begin
        stage[0] <= din;
        for (int i = 1; i < int'(DEPTH); i++) stage[i] <= stage[i-1];
      end
    end

    assign dout = stage[DEPTH-1];
  end

endmodule : delay_chain
