// dma_ctrl: instruction issue and control unit (the "DMA controller" of the system).
//
// The processor unit programs a register pool through a simple register port
// and starts an application. The controller then owns the PEs and the memory
// system until the application ends: it fetches instruction words from the local
// memory and broadcasts them to all PEs, and turns memory-reference instructions
// into accesses of the multi-access memory system.
//
// Scan loop: the program (PROG_LEN words from PROG_BASE) is run once for every
// scan position (YB, XB), YB = Y0, Y0+YSTEP, .. <= Y1 and, inside, XB = X0,
// X0+XSTEP, .. <= X1. A memory-reference instruction addresses (YB+dy, XB+dx).
//
// Pairing: a memory-reference instruction and a general instruction that follow
// each other are issued in the same cycle (in either order) when they share no
// register; otherwise one instruction issues per cycle.
// Stall: a scoreboard marks the destination of every LOAD in flight; an
// instruction that names a marked register waits until the load returns
// (tagged with its register by the memory system).
//
// Register map (word address on pu_addr):
//   0 CTRL   write bit0 = 1: start (ignored while busy)
//   1 PROG_BASE  2 PROG_LEN
//   3 Y0  4 Y1  5 YSTEP  6 X0  7 X1  8 XSTEP   (signed, CRD_W bits used)
//   9 DATA   word broadcast to the PEs for IN
//  10 STATUS bit0 busy, bit1 done (cleared by start)
//  11 CYCLES cycles of the last run   12 STALLS stall cycles   13 PAIRS dual issues
//  16+k  last OUT value of PE k (read only)
// Timing: issue is combinational from the local memory read ports; the memory
// request and the PE instruction words leave in the same cycle. After the last
// scan position the controller waits for the memory pipeline to drain
// (DRAIN_CYC cycles, no loads pending) and then sets done and irq for one cycle.
// The role (fetch from local memory, issue to PEs, control them, hold the bus
// for the whole application) follows the source; the register map, the scan
// loop, the pairing rule details and the scoreboard are this design's choice.
module dma_ctrl
  import pps_pkg::*;
#(
  parameter int unsigned N_PE      = 4,
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned NREG      = 8,
  parameter int unsigned LM_DEPTH  = 1024,
  parameter int unsigned DRAIN_CYC = 4,
  localparam int unsigned RW       = $clog2(NREG),
  localparam int unsigned LAW      = $clog2(LM_DEPTH)
)(
  input  logic                    clk,
  input  logic                    rst,
  // processor unit register port
  input  logic                    pu_we,
  input  logic [4:0]              pu_addr,
  input  logic [31:0]             pu_wdata,
  output logic [31:0]             pu_rdata,
  output logic                    busy,
  output logic                    irq,
  // local memory read ports
  output logic [LAW-1:0]          lm_raddr0,
  input  logic [31:0]             lm_rdata0,
  output logic [LAW-1:0]          lm_raddr1,
  input  logic [31:0]             lm_rdata1,
  // to the PEs (broadcast)
  output logic                    gen_valid,
  output logic [31:0]             gen_instr,
  output logic                    mem_valid,
  output logic [31:0]             mem_instr,
  output logic [DATA_W-1:0]       in_data,
  input  logic [DATA_W-1:0]       pe_out   [N_PE],
  input  logic [N_PE-1:0]         pe_out_valid,
  // to the memory system
  output logic                    m_req,
  output logic                    m_we,
  output acc_t                    m_acc,
  output logic [INTV_W-1:0]       m_intv,
  output logic signed [CRD_W-1:0] m_y,
  output logic signed [CRD_W-1:0] m_x,
  output logic [RW-1:0]           m_tag,
  input  logic                    m_rvalid,
  input  logic [RW-1:0]           m_rtag
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_t;
  state_t state;

  logic [LAW-1:0]          prog_base, pc, prog_end;
  logic [LAW:0]            prog_len;
  logic signed [CRD_W-1:0] y0, y1, ystep, x0, x1, xstep, yb, xb;
  logic [DATA_W-1:0]       data_r;
  logic                    done;
  logic [31:0]             cycles, stalls, pairs;
  logic [DATA_W-1:0]       out_r [N_PE];
  logic [NREG-1:0]         pending;
  logic [$clog2(DRAIN_CYC+1)-1:0] drain;

  // ---------------------------------------------------------------- decode
  function automatic logic [NREG-1:0] regs_of(logic [31:0] w);
    logic [NREG-1:0] m;
    m = '0;
    if (is_mem_op(w[31:27])) m[w[24 +: RW]] = 1'b1;
    else if (w[31:27] != OP_NOP && is_gen_op(w[31:27])) begin
      m[w[24 +: RW]] = 1'b1;
      m[w[21 +: RW]] = 1'b1;
      m[w[18 +: RW]] = 1'b1;
    end
    return m;
  endfunction

  logic [31:0]     i0, i1;
  logic            i1_ok, i0_mem, i1_mem, haz0, haz1, iss0, iss1, last_pos, at_end;
  logic [NREG-1:0] r0, r1;

  assign lm_raddr0 = pc;
  assign lm_raddr1 = pc + 1'b1;
  assign i0        = lm_rdata0;
  assign i1        = lm_rdata1;
  assign i1_ok     = (pc + 1'b1) != prog_end;
  assign i0_mem    = is_mem_op(i0[31:27]);
  assign i1_mem    = is_mem_op(i1[31:27]);
  assign r0        = regs_of(i0);
  assign r1        = regs_of(i1);
  assign haz0      = |(r0 & pending);
  assign haz1      = |(r1 & pending);
  assign iss0      = state == S_RUN && !haz0;
  assign iss1      = iss0 && i1_ok && (i0_mem != i1_mem) && !haz1 && ((r0 & r1) == '0);
  assign at_end    = (iss1 ? pc + LAW'(2) : pc + 1'b1) == prog_end;
  assign last_pos  = (xb + xstep > x1) && (yb + ystep > y1);

  // ---------------------------------------------------------------- issue
  logic [31:0] mw;
  always_comb begin
    gen_valid = 1'b0; gen_instr = '0;
    mem_valid = 1'b0; mem_instr = '0;
    if (iss0) begin
      if (i0_mem) begin mem_valid = 1'b1; mem_instr = i0; end
      else        begin gen_valid = 1'b1; gen_instr = i0; end
    end
    if (iss1) begin
      if (i1_mem) begin mem_valid = 1'b1; mem_instr = i1; end
      else        begin gen_valid = 1'b1; gen_instr = i1; end
    end
    mw     = mem_instr;
    m_req  = mem_valid;
    m_we   = mw[31:27] == OP_STORE;
    m_acc  = acc_t'(mw[23:22]);
    m_intv = mw[21:18];
    m_y    = yb + CRD_W'(signed'(mw[17:9]));
    m_x    = xb + CRD_W'(signed'(mw[8:0]));
    m_tag  = mw[24 +: RW];
  end

  assign in_data = data_r;
  assign busy    = state != S_IDLE;

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      pc <= '0; prog_base <= '0; prog_len <= '0; prog_end <= '0;
      y0 <= '0; y1 <= '0; ystep <= CRD_W'(1); x0 <= '0; x1 <= '0; xstep <= CRD_W'(1);
      yb <= '0; xb <= '0; data_r <= '0; done <= 1'b0; irq <= 1'b0;
      cycles <= '0; stalls <= '0; pairs <= '0; pending <= '0; drain <= '0;
      for (int unsigned k = 0; k < N_PE; k++) out_r[k] <= '0;
    end else begin
      irq <= 1'b0;
      // register writes from the processor unit
      if (pu_we) begin
        unique case (pu_addr)
          5'd1: prog_base <= pu_wdata[LAW-1:0];
          5'd2: prog_len  <= pu_wdata[LAW:0];
          5'd3: y0        <= pu_wdata[CRD_W-1:0];
          5'd4: y1        <= pu_wdata[CRD_W-1:0];
          5'd5: ystep     <= pu_wdata[CRD_W-1:0];
          5'd6: x0        <= pu_wdata[CRD_W-1:0];
          5'd7: x1        <= pu_wdata[CRD_W-1:0];
          5'd8: xstep     <= pu_wdata[CRD_W-1:0];
          5'd9: data_r    <= pu_wdata[DATA_W-1:0];
          default: ;
        endcase
      end
      // PE outputs
      for (int unsigned k = 0; k < N_PE; k++)
        if (pe_out_valid[k]) out_r[k] <= pe_out[k];
      // scoreboard: set on LOAD issue, clear on return
      begin
        logic [NREG-1:0] p;
        p = pending;
        if (m_rvalid) p[m_rtag] = 1'b0;
        if (mem_valid && mw[31:27] == OP_LOAD) p[m_tag] = 1'b1;
        pending <= p;
      end

      unique case (state)
        S_IDLE: if (pu_we && pu_addr == 5'd0 && pu_wdata[0] && prog_len != '0) begin
          state    <= S_RUN;
          pc       <= prog_base;
          prog_end <= prog_base + prog_len[LAW-1:0];
          yb <= y0; xb <= x0;
          done <= 1'b0; cycles <= '0; stalls <= '0; pairs <= '0;
        end
        S_RUN: begin
          cycles <= cycles + 1;
          if (!iss0) stalls <= stalls + 1;
          if (iss1)  pairs  <= pairs + 1;
          if (iss0) begin
            if (!at_end) pc <= iss1 ? pc + LAW'(2) : pc + 1'b1;
            else begin
              pc <= prog_base;
              if (last_pos) begin
                state <= S_DRAIN;
                drain <= '0;
              end else if (xb + xstep > x1) begin
                xb <= x0; yb <= yb + ystep;
              end else xb <= xb + xstep;
            end
          end
        end
        S_DRAIN: begin
          cycles <= cycles + 1;
          if (drain != DRAIN_CYC[$bits(drain)-1:0]) drain <= drain + 1'b1;
          else if (pending == '0) begin
            state <= S_IDLE; done <= 1'b1; irq <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- read back
  always_comb begin
    pu_rdata = '0;
    unique case (pu_addr)
      5'd1:  pu_rdata = 32'(prog_base);
      5'd2:  pu_rdata = 32'(prog_len);
      5'd3:  pu_rdata = 32'(y0);
      5'd4:  pu_rdata = 32'(y1);
      5'd5:  pu_rdata = 32'(ystep);
      5'd6:  pu_rdata = 32'(x0);
      5'd7:  pu_rdata = 32'(x1);
      5'd8:  pu_rdata = 32'(xstep);
      5'd9:  pu_rdata = 32'(data_r);
      5'd10: pu_rdata = {30'd0, done, busy};
      5'd11: pu_rdata = cycles;
      5'd12: pu_rdata = stalls;
      5'd13: pu_rdata = pairs;
      default:
        for (int unsigned k = 0; k < N_PE; k++)
          if (pu_addr == 5'(16 + k)) pu_rdata = 32'(out_r[k]);
    endcase
  end

  a_one_class_each: assert property (@(posedge clk) disable iff (rst)
    iss1 |-> (i0_mem != i1_mem));

endmodule
