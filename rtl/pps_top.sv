// pps_top: SIMD parallel image processing system.
//
// N_PE processing elements execute one instruction stream in lock step. Their
// image data sits in a multi-access memory system that, in a single memory cycle,
// hands PE k the k-th element of a horizontal, vertical or 2x2-block group of
// image points spaced by a constant interval, so neighbourhood operations such
// as mask filters and frame differences run N_PE points at a time.
//
// Blocks: dma_ctrl (instruction issue and control, programmed by the processor
// unit), local_mem (instruction store), N_PE x pe, and mams (memory selection,
// address calculation, data routing and the M_MOD memory modules).
// The embedded processor unit, the host and its PCI bus are outside this RTL:
// their side appears as three ports:
//   - pu_*  : register port of the issue unit (start, scan window, status)
//   - lm_*  : write/read port of the local memory (program loading)
//   - h_*   : image port into the memory system, usable while the system is
//             idle (h_ready); reads return h_rvalid/h_rdata four cycles later.
// While an application runs (busy), the issue unit and the PEs own the memory
// system. Tags on memory reads tell the two owners' returns apart: the top bit
// marks a PE load, the rest carry the PE destination register.
module pps_top
  import pps_pkg::*;
#(
  parameter int unsigned N_PE     = 4,
  parameter int unsigned M_MOD    = 5,
  parameter int unsigned IMG_W    = 176,
  parameter int unsigned ROWS     = 512,
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned NREG     = 8,
  parameter int unsigned LM_DEPTH = 1024,
  localparam int unsigned RW      = $clog2(NREG),
  localparam int unsigned LAW     = $clog2(LM_DEPTH)
)(
  input  logic                    clk,
  input  logic                    rst,
  // processor unit: issue-unit registers
  input  logic                    pu_we,
  input  logic [4:0]              pu_addr,
  input  logic [31:0]             pu_wdata,
  output logic [31:0]             pu_rdata,
  output logic                    busy,
  output logic                    irq,
  // processor unit: local memory
  input  logic                    lm_we,
  input  logic [LAW-1:0]          lm_addr,
  input  logic [31:0]             lm_wdata,
  output logic [31:0]             lm_rdata,
  // processor unit / host: image port into the memory system
  output logic                    h_ready,
  input  logic                    h_req,
  input  logic                    h_we,
  input  acc_t                    h_acc,
  input  logic [INTV_W-1:0]       h_intv,
  input  logic signed [CRD_W-1:0] h_y,
  input  logic signed [CRD_W-1:0] h_x,
  input  logic [DATA_W-1:0]       h_wdata [N_PE],
  output logic                    h_rvalid,
  output logic [DATA_W-1:0]       h_rdata [N_PE],
  output logic [N_PE-1:0]         h_relem,
  output logic                    conflict
);

  localparam int unsigned TAG_W = RW + 1;

  logic [LAW-1:0]          lm_raddr0, lm_raddr1;
  logic [31:0]             lm_rdata0, lm_rdata1;
  logic                    gen_valid, mem_valid;
  logic [31:0]             gen_instr, mem_instr;
  logic [DATA_W-1:0]       in_data;
  logic [DATA_W-1:0]       pe_out [N_PE];
  logic [N_PE-1:0]         pe_out_valid;
  logic [DATA_W-1:0]       st_data [N_PE];

  logic                    d_req, d_we;
  acc_t                    d_acc;
  logic [INTV_W-1:0]       d_intv;
  logic signed [CRD_W-1:0] d_y, d_x;
  logic [RW-1:0]           d_tag;

  logic                    m_req, m_we, m_rvalid;
  acc_t                    m_acc;
  logic [INTV_W-1:0]       m_intv;
  logic signed [CRD_W-1:0] m_y, m_x;
  logic [DATA_W-1:0]       m_wdata [N_PE];
  logic [DATA_W-1:0]       m_rdata [N_PE];
  logic [N_PE-1:0]         m_relem;
  logic [TAG_W-1:0]        m_tag, m_rtag;
  logic                    pe_ld;

  local_mem #(.DEPTH(LM_DEPTH)) u_lm (
    .clk, .pu_we(lm_we), .pu_addr(lm_addr), .pu_wdata(lm_wdata), .pu_rdata(lm_rdata),
    .raddr0(lm_raddr0), .rdata0(lm_rdata0), .raddr1(lm_raddr1), .rdata1(lm_rdata1)
  );

  dma_ctrl #(.N_PE(N_PE), .DATA_W(DATA_W), .NREG(NREG), .LM_DEPTH(LM_DEPTH)) u_dma (
    .clk, .rst, .pu_we, .pu_addr, .pu_wdata, .pu_rdata, .busy, .irq,
    .lm_raddr0, .lm_rdata0, .lm_raddr1, .lm_rdata1,
    .gen_valid, .gen_instr, .mem_valid, .mem_instr, .in_data, .pe_out, .pe_out_valid,
    .m_req(d_req), .m_we(d_we), .m_acc(d_acc), .m_intv(d_intv), .m_y(d_y), .m_x(d_x),
    .m_tag(d_tag), .m_rvalid(pe_ld), .m_rtag(m_rtag[RW-1:0])
  );

  for (genvar k = 0; k < N_PE; k++) begin : g_pe
    pe #(.DATA_W(DATA_W), .NREG(NREG)) u_pe (
      .clk, .rst, .gen_valid, .gen_instr, .mem_valid, .mem_instr, .in_data,
      .st_data(st_data[k]), .ld_valid(pe_ld), .ld_reg(m_rtag[RW-1:0]), .ld_data(m_rdata[k]),
      .out_data(pe_out[k]), .out_valid(pe_out_valid[k])
    );
  end

  // Memory system owner: the issue unit while busy, the image port otherwise.
  always_comb begin
    if (busy) begin
      m_req = d_req; m_we = d_we; m_acc = d_acc; m_intv = d_intv;
      m_y = d_y; m_x = d_x; m_wdata = st_data; m_tag = {1'b1, d_tag};
    end else begin
      m_req = h_req; m_we = h_we; m_acc = h_acc; m_intv = h_intv;
      m_y = h_y; m_x = h_x; m_wdata = h_wdata; m_tag = '0;
    end
  end

  mams #(.N_PE(N_PE), .M_MOD(M_MOD), .IMG_W(IMG_W), .ROWS(ROWS), .DATA_W(DATA_W),
         .TAG_W(TAG_W)) u_mams (
    .clk, .rst, .req_valid(m_req), .req_we(m_we), .acc(m_acc), .intv(m_intv),
    .y(m_y), .x(m_x), .wdata(m_wdata), .tag(m_tag),
    .rvalid(m_rvalid), .rtag(m_rtag), .rdata(m_rdata), .relem(m_relem), .conflict
  );

  assign pe_ld    = m_rvalid && m_rtag[TAG_W-1];
  assign h_rvalid = m_rvalid && !m_rtag[TAG_W-1];
  assign h_rdata  = m_rdata;
  assign h_relem  = m_relem;
  assign h_ready  = !busy;

endmodule
