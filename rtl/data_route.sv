// data_route: data routing stage of the multi-access memory system.
//
// WRITE side: the router puts the word of PE k into slot k*d mod M_MOD, where d
// is the module step of the access; two registers carry the slots to the memory
// cycle in which a module takes its write data, and the barrel shifter rotates
// slot s onto module (mu0 + s) mod M_MOD.
// READ side: the barrel shifter rotates the module outputs back so that slot s
// holds module (mu0 + s) mod M_MOD, a register captures them, and the router
// hands slot k*d mod M_MOD to PE k.
//
// Interface: d_a comes with the PE data in cycle t; mu0_w is the origin module of
// the access whose data sits in the second write register; mu0_r and d_r belong
// to the access whose module outputs are on mod_rdata, and to the access in the
// read register respectively (the surrounding pipeline supplies them).
// Timing: wdata at cycle t leaves on mod_wdata in cycle t+2; mod_rdata at cycle u
// reaches pe_rdata in cycle u+1.
// The register counts on both sides follow the block diagram of the memory
// system; the slot order k*d mod M_MOD is this design's choice.
module data_route
  import pps_pkg::*;
#(
  parameter int unsigned N_PE   = 4,
  parameter int unsigned M_MOD  = 5,
  parameter int unsigned DATA_W = 16,
  localparam int unsigned MW    = $clog2(M_MOD)
)(
  input  logic              clk,
  input  logic              rst,
  // write side
  input  logic [MW-1:0]     d_a,
  input  logic [DATA_W-1:0] pe_wdata  [N_PE],
  input  logic [MW-1:0]     mu0_w,
  output logic [DATA_W-1:0] mod_wdata [M_MOD],
  // read side
  input  logic [DATA_W-1:0] mod_rdata [M_MOD],
  input  logic [MW-1:0]     mu0_r,
  input  logic [MW-1:0]     d_r,
  output logic [DATA_W-1:0] pe_rdata  [N_PE]
);

  logic [DATA_W-1:0] wslot_a [M_MOD];
  logic [DATA_W-1:0] wslot_1 [M_MOD];
  logic [DATA_W-1:0] wslot_2 [M_MOD];
  logic [DATA_W-1:0] rslot_a [M_MOD];
  logic [DATA_W-1:0] rslot_q [M_MOD];

  // Router (WRITE)
  always_comb begin
    for (int unsigned s = 0; s < M_MOD; s++) wslot_a[s] = '0;
    for (int unsigned k = 0; k < N_PE; k++)
      wslot_a[(k * int'(d_a)) % M_MOD] = pe_wdata[k];
  end

  // Barrel shifter (READ)
  always_comb begin
    for (int unsigned s = 0; s < M_MOD; s++)
      rslot_a[s] = mod_rdata[(s + int'(mu0_r)) % M_MOD];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned s = 0; s < M_MOD; s++) begin
        wslot_1[s] <= '0;
        wslot_2[s] <= '0;
        rslot_q[s] <= '0;
      end
    end else begin
      wslot_1 <= wslot_a;
      wslot_2 <= wslot_1;
      rslot_q <= rslot_a;
    end
  end

  // Barrel shifter (WRITE)
  always_comb begin
    for (int unsigned m = 0; m < M_MOD; m++)
      mod_wdata[m] = wslot_2[(m + M_MOD - int'(mu0_w)) % M_MOD];
  end

  // Router (READ)
  always_comb begin
    for (int unsigned k = 0; k < N_PE; k++)
      pe_rdata[k] = rslot_q[(k * int'(d_r)) % M_MOD];
  end

endmodule
