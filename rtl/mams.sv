// mams: pipelined multi-access memory system (controller plus memory modules).
//
// N_PE processing elements read or write N_PE image elements in one access. An
// access names an origin (Y, X), a type (horizontal, vertical or 2x2 block) and a
// constant interval r between its elements; element k goes to or comes from PE k.
// The elements are spread over M_MOD memory modules (M_MOD prime, > N_PE) by the
// module function mu(y,x) = (2y + x) mod M_MOD, so every access with r not a
// multiple of M_MOD touches N_PE distinct modules and completes in one memory
// cycle. Inside a module an element sits at alpha(y,x) = y*S + floor(x/N_PE),
// S = ceil(IMG_W/N_PE), so each module holds ROWS*S words.
//
// Three stages work side by side as in the block diagram of the memory system:
// module selection (module_select), address calculation and routing (addr_calc)
// and data routing (data_route), in front of the memory modules (mem_module).
//
// Pipeline (one new access may enter every cycle):
//   cycle t   request sampled (req_valid, req_we, acc, intv, y, x, wdata, tag)
//   cycle t+1 module enables and addresses reach the modules
//   cycle t+2 write data reaches the modules (written at the end of t+2)
//   cycle t+3 module outputs rotated back, registered
//   cycle t+4 rvalid, rdata[k], relem[k] (element k existed) and rtag for a read
// Elements outside the stored image, and all elements of an access whose interval
// is a multiple of M_MOD (or of a reserved type), are neither written nor read;
// they read as 0 and relem is clear. conflict pulses in cycle t+1 for a refused
// access. The tag travels with a read so the requester can tell where the data
// goes. Read-after-write to the same element in consecutive cycles returns the
// new value.
module mams
  import pps_pkg::*;
#(
  parameter int unsigned N_PE   = 4,
  parameter int unsigned M_MOD  = 5,
  parameter int unsigned IMG_W  = 176,
  parameter int unsigned ROWS   = 512,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned TAG_W  = 3,
  localparam int unsigned MW    = $clog2(M_MOD),
  localparam int unsigned S     = (IMG_W + N_PE - 1) / N_PE,
  localparam int unsigned AW    = $clog2(ROWS * S)
)(
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    req_valid,
  input  logic                    req_we,
  input  acc_t                    acc,
  input  logic [INTV_W-1:0]       intv,
  input  logic signed [CRD_W-1:0] y,
  input  logic signed [CRD_W-1:0] x,
  input  logic [DATA_W-1:0]       wdata [N_PE],
  input  logic [TAG_W-1:0]        tag,
  output logic                    rvalid,
  output logic [TAG_W-1:0]        rtag,
  output logic [DATA_W-1:0]       rdata [N_PE],
  output logic [N_PE-1:0]         relem,
  output logic                    conflict
);

  typedef struct packed {
    logic             valid;
    logic             we;
    logic [TAG_W-1:0] tag;
    logic [MW-1:0]    mu0;
    logic [MW-1:0]    d;
    logic [M_MOD-1:0] slot_en;
  } ctl_t;

  logic [MW-1:0]     d_a, mu0_q, d_q;
  logic [M_MOD-1:0]  slot_en_a, slot_en_q, mod_en;
  logic              conflict_q;
  logic [AW-1:0]     maddr     [M_MOD];
  logic [DATA_W-1:0] mod_wdata [M_MOD];
  logic [DATA_W-1:0] mod_rdata [M_MOD];
  logic [DATA_W-1:0] pe_rdata  [N_PE];
  ctl_t              c1, c2, c3, c4;
  logic [N_PE-1:0]   elem_a;

  module_select #(.N_PE(N_PE), .M_MOD(M_MOD), .IMG_W(IMG_W), .ROWS(ROWS)) u_sel (
    .clk, .rst, .req_valid, .acc, .intv, .y, .x,
    .d_a, .slot_en_a, .mu0_q, .d_q, .slot_en_q, .conflict_q, .mod_en
  );

  addr_calc #(.N_PE(N_PE), .M_MOD(M_MOD), .IMG_W(IMG_W), .ROWS(ROWS)) u_addr (
    .clk, .rst, .acc, .intv, .y, .x, .d_a, .mu0_q, .maddr
  );

  data_route #(.N_PE(N_PE), .M_MOD(M_MOD), .DATA_W(DATA_W)) u_route (
    .clk, .rst, .d_a, .pe_wdata(wdata), .mu0_w(c2.mu0), .mod_wdata,
    .mod_rdata, .mu0_r(c3.mu0), .d_r(c4.d), .pe_rdata
  );

  for (genvar m = 0; m < M_MOD; m++) begin : g_mod
    mem_module #(.DEPTH(ROWS * S), .DATA_W(DATA_W)) u_mem (
      .clk, .rst, .en(mod_en[m] && c1.valid), .we(c1.we), .addr(maddr[m]),
      .wdata(mod_wdata[m]), .rdata(mod_rdata[m])
    );
  end

  // Control pipeline that accompanies the access. Stage 1 takes mu0, d and the
  // slot enables from the module selection register.
  ctl_t c1_r;
  assign c1 = '{valid: c1_r.valid, we: c1_r.we, tag: c1_r.tag,
                mu0: mu0_q, d: d_q, slot_en: slot_en_q};

  always_ff @(posedge clk) begin
    if (rst) begin
      c1_r <= '0;
      c2   <= '0;
      c3   <= '0;
      c4   <= '0;
    end else begin
      c1_r <= '{valid: req_valid, we: req_we, tag: tag, mu0: '0, d: '0, slot_en: '0};
      c2   <= c1;
      c3   <= c2;
      c4   <= c3;
    end
  end

  // Output: read data of live elements only.
  always_comb begin
    for (int unsigned k = 0; k < N_PE; k++) begin
      elem_a[k] = c4.slot_en[(k * int'(c4.d)) % M_MOD];
      rdata[k]  = elem_a[k] ? pe_rdata[k] : '0;
    end
  end

  assign rvalid   = c4.valid && !c4.we;
  assign rtag     = c4.tag;
  assign relem    = elem_a;
  assign conflict = conflict_q;

endmodule
