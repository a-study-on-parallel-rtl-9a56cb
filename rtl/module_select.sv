// module_select: memory module selection stage of the multi-access memory system.
//
// From the access origin (Y, X), the access type and the interval it works out
// which of the M_MOD memory modules each of the N_PE elements of the access lives
// in. The "address" step reduces the origin to its module number
// mu0 = (2*Y + X) mod M_MOD; the slot table (a small ROM, one column per module
// step d) gives the slot k*d mod M_MOD of element k, and the interval selects the
// column (the MUX). Slot enables, mu0 and d are registered; the decoder after the
// register rotates the slot enables by mu0 so that module (mu0 + s) mod M_MOD is
// enabled when slot s holds a live element. The unused module of each access
// stays idle.
//
// An element is live when it lies inside the stored image (0 <= y < ROWS,
// 0 <= x < IMG_W) and the access is conflict-free (interval not a multiple of
// M_MOD, type not reserved). conflict_q flags a refused access.
//
// Timing: inputs in cycle t, registered at the following edge; mod_en is valid
// in cycle t+1, driven combinationally from the register.
// The stage order (address, ROM, MUX, register, decoder) follows the block
// diagram of the memory system; the module function and the range check are
// this design's own choices.
module module_select
  import pps_pkg::*;
#(
  parameter int unsigned N_PE  = 4,
  parameter int unsigned M_MOD = 5,
  parameter int unsigned IMG_W = 176,
  parameter int unsigned ROWS  = 512,
  localparam int unsigned MW   = $clog2(M_MOD)
)(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    req_valid,
  input  acc_t                    acc,
  input  logic [INTV_W-1:0]       intv,
  input  logic signed [CRD_W-1:0] y,
  input  logic signed [CRD_W-1:0] x,
  // stage-0 (combinational) outputs used by the routers
  output logic [MW-1:0]           d_a,
  output logic [M_MOD-1:0]        slot_en_a,
  // stage-1 (registered) outputs
  output logic [MW-1:0]           mu0_q,
  output logic [MW-1:0]           d_q,
  output logic [M_MOD-1:0]        slot_en_q,
  output logic                    conflict_q,
  output logic [M_MOD-1:0]        mod_en
);

  logic [MW-1:0] mu0_a;
  logic          conflict_a;

  // "Address": module number of the origin. Negative origins are folded with a
  // positive bias so the modulo stays unsigned; such elements are disabled below.
  localparam logic signed [CRD_W+2:0] MS = (CRD_W+3)'(M_MOD);
  localparam logic signed [CRD_W+2:0] BQS = (CRD_W+3)'(BQ);
  logic signed [CRD_W+2:0] lin;
  always_comb begin
    lin   = BQS * (CRD_W+3)'(y) + (CRD_W+3)'(x);
    mu0_a = MW'(((lin % MS) + MS) % MS);
  end

  // "ROM + MUX": slot of each element for the selected module step.
  logic signed [CRD_W+1:0] ye [N_PE];
  logic signed [CRD_W+1:0] xe [N_PE];
  always_comb begin
    d_a        = MW'(module_step(acc, intv, M_MOD));
    conflict_a = (acc == ACC_RSV) || (d_a == '0);
    slot_en_a  = '0;
    for (int unsigned k = 0; k < N_PE; k++) begin
      ye[k] = (CRD_W+2)'(y) + (CRD_W+2)'(elem_dy(acc, intv, k));
      xe[k] = (CRD_W+2)'(x) + (CRD_W+2)'(elem_dx(acc, intv, k));
      if (req_valid && !conflict_a && ye[k] >= 0 && ye[k] < (CRD_W+2)'(ROWS) &&
          xe[k] >= 0 && xe[k] < (CRD_W+2)'(IMG_W))
        slot_en_a[(k * int'(d_a)) % M_MOD] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mu0_q      <= '0;
      d_q        <= '0;
      slot_en_q  <= '0;
      conflict_q <= 1'b0;
    end else begin
      mu0_q      <= mu0_a;
      d_q        <= d_a;
      slot_en_q  <= slot_en_a;
      conflict_q <= req_valid && conflict_a;
    end
  end

  // Decoder: module m is enabled when slot (m - mu0) mod M_MOD is live.
  always_comb begin
    for (int unsigned m = 0; m < M_MOD; m++)
      mod_en[m] = slot_en_q[(m + M_MOD - int'(mu0_q)) % M_MOD];
  end

endmodule
