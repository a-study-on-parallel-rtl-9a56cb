// addr_calc: address calculation and routing stage of the multi-access memory system.
//
// Each element k of an access gets the address alpha(y_k, x_k) = y_k*S + floor(x_k/N_PE)
// inside its memory module, S = ceil(IMG_W/N_PE) words per stored row. The offset
// ROM, indexed by access type, interval and element number, holds each element's
// row offset already scaled by S (dy_k*S) and its column offset dx_k; the adder
// forms Y*S + dy_k*S + floor((X + dx_k)/N_PE). The N_PE addresses are written into
// the slots chosen by the module step d (slot k*d mod M_MOD, the same order the
// write-data router uses), registered, and the barrel shifter rotates slot s onto
// module (mu0 + s) mod M_MOD. Slots that hold no element carry address 0; their
// modules are disabled by the module selection stage.
//
// Interface: origin, type and interval in cycle t (with d from module_select);
// maddr is valid in cycle t+1, from the register through the barrel shifter.
// The ROM / adder / register / barrel-shifter order follows the block diagram of
// the memory system; the address function itself is this design's choice.
module addr_calc
  import pps_pkg::*;
#(
  parameter int unsigned N_PE  = 4,
  parameter int unsigned M_MOD = 5,
  parameter int unsigned IMG_W = 176,
  parameter int unsigned ROWS  = 512,
  localparam int unsigned MW   = $clog2(M_MOD),
  localparam int unsigned S    = (IMG_W + N_PE - 1) / N_PE,
  localparam int unsigned AW   = $clog2(ROWS * S)
)(
  input  logic                    clk,
  input  logic                    rst,
  input  acc_t                    acc,
  input  logic [INTV_W-1:0]       intv,
  input  logic signed [CRD_W-1:0] y,
  input  logic signed [CRD_W-1:0] x,
  input  logic [MW-1:0]           d_a,     // module step, stage 0
  input  logic [MW-1:0]           mu0_q,   // origin module, stage 1
  output logic [AW-1:0]           maddr [M_MOD]
);

  logic [AW-1:0] slot_addr_a [M_MOD];
  logic [AW-1:0] slot_addr_q [M_MOD];

  logic signed [CRD_W+1:0] ye [N_PE];
  logic signed [CRD_W+1:0] xe [N_PE];
  logic [AW-1:0]           rowoff [N_PE];   // offset ROM output, dy_k * S
  always_comb begin
    for (int unsigned s = 0; s < M_MOD; s++) slot_addr_a[s] = '0;
    for (int unsigned k = 0; k < N_PE; k++) begin
      rowoff[k] = AW'(elem_dy(acc, intv, k) * int'(S));
      ye[k] = (CRD_W+2)'(y) + (CRD_W+2)'(elem_dy(acc, intv, k));
      xe[k] = (CRD_W+2)'(x) + (CRD_W+2)'(elem_dx(acc, intv, k));
      if (ye[k] >= 0 && ye[k] < (CRD_W+2)'(ROWS) && xe[k] >= 0 && xe[k] < (CRD_W+2)'(IMG_W))
        slot_addr_a[(k * int'(d_a)) % M_MOD] =
          AW'(y) * AW'(S) + rowoff[k] + AW'(xe[k] / (CRD_W+2)'(N_PE));   // adder
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned s = 0; s < M_MOD; s++) slot_addr_q[s] <= '0;
    end else begin
      slot_addr_q <= slot_addr_a;
    end
  end

  // Barrel shifter: module m takes slot (m - mu0) mod M_MOD.
  always_comb begin
    for (int unsigned m = 0; m < M_MOD; m++)
      maddr[m] = slot_addr_q[(m + M_MOD - int'(mu0_q)) % M_MOD];
  end

endmodule
