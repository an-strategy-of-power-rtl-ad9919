// ant_multiplier: 16x16 signed algorithmic-noise-tolerant (ANT) multiplier
// with a fixed-width reduced-precision replica.
//
// The idea: run the full-precision main multiplier below its critical supply
// voltage to save energy and accept that it sometimes produces large errors
// on its upper bits. A small replica, an 8x8 fixed-width multiplier fed with
// the upper 8 bits of each operand, computes a coarse product beside it. When
// the two differ by more than a threshold the replica's value is output,
// otherwise the exact main product. Because the replica is fixed-width (only
// the upper half of its product, with error compensation), it is about half
// the size of a full-width replica.
//
// Structure, as published: main block (Baugh-Wooley multiplier), fixed-width
// RPR with compensation, one register after each, then the error-correction
// block (subtract, compare with Th, multiplexer). Which operand bits the
// replica receives, the threshold and the reset are this design's choices.
//
// Timing: x and y are sampled at a rising clock edge; y_hat and use_rpr
// reflect them right after that edge (latency one cycle, one result per
// cycle). rst_n is asynchronous and active low and clears both registers.
module ant_multiplier
  import ant_pkg::*;
#(
  parameter int unsigned MW  = MAIN_W,
  parameter int unsigned RW  = RPR_W,
  parameter int unsigned THL = TH_RPR_LSB
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [MW-1:0]   x,
  input  logic signed [MW-1:0]   y,
  output logic signed [2*MW-1:0] y_hat,
  output logic                   use_rpr,
  output logic signed [2*MW-1:0] ya_q,
  output logic signed [RW-1:0]   yr_q
);
  // the replica's output LSB has weight 2^(2*(MW-RW) + RW) in the main product
  localparam int unsigned SHIFT = 2*MW - RW;

  logic signed [2*MW-1:0] ya;
  logic signed [RW-1:0]   yr;

  bw_mult #(.N(MW)) u_main (.x(x), .y(y), .p(ya));

  fixed_width_rpr #(.N(RW)) u_rpr (
    .x(x[MW-1 -: RW]),
    .y(y[MW-1 -: RW]),
    .p(yr)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ya_q <= '0;
      yr_q <= '0;
    end else begin
      ya_q <= ya;
      yr_q <= yr;
    end
  end

  ant_ecb #(
    .YA_W (2*MW),
    .YR_W (RW),
    .SHIFT(SHIFT),
    .TH   ((2*MW+1)'(THL) << SHIFT)
  ) u_ecb (
    .ya     (ya_q),
    .yr     (yr_q),
    .y_hat  (y_hat),
    .use_rpr(use_rpr)
  );
endmodule
