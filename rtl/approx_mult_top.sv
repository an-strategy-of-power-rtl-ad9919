// approx_mult_top: the two multipliers side by side.
//
// Two independent designs share this top and no signal: the 16x16 signed
// algorithmic-noise-tolerant multiplier with its fixed-width replica
// (ant_multiplier, clocked, one cycle latency) and the 8x8 unsigned
// approximate multiplier built on altered partial products (approx_mult8,
// combinational). Each keeps its own ports, prefixed ant_ and am_. The supply
// voltage scaling that motivates the ANT scheme is not logic and has no port.
module approx_mult_top
  import ant_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [MAIN_W-1:0]   ant_x,
  input  logic signed [MAIN_W-1:0]   ant_y,
  output logic signed [2*MAIN_W-1:0] ant_y_hat,
  output logic                       ant_use_rpr,
  output logic signed [2*MAIN_W-1:0] ant_ya,
  output logic signed [RPR_W-1:0]    ant_yr,
  input  logic [7:0]                 am_alpha,
  input  logic [7:0]                 am_beta,
  output logic [15:0]                am_prod
);
  ant_multiplier u_ant (
    .clk    (clk),
    .rst_n  (rst_n),
    .x      (ant_x),
    .y      (ant_y),
    .y_hat  (ant_y_hat),
    .use_rpr(ant_use_rpr),
    .ya_q   (ant_ya),
    .yr_q   (ant_yr)
  );

  approx_mult8 u_am (
    .alpha(am_alpha),
    .beta (am_beta),
    .prod (am_prod)
  );
endmodule
