// pps_pkg: shared types and constants of the SIMD image processing system.
//
// It holds the access types of the multi-access memory system (MAMS), the
// instruction set of the processing elements (PEs) and the arithmetic of the
// storage scheme, so that the address path, the routing path and the testbenches
// all agree on one definition.
//
// Storage scheme (this design's choice; the source only requires that elements
// accessed together sit in distinct modules and that elements of one module get
// distinct addresses):
//   module  mu(y,x)    = (BQ*y + x) mod M_MOD      BQ = 2, M_MOD = 5
//   address alpha(y,x) = y*S + floor(x/N_PE)       S  = ceil(IMG_W/N_PE)
// Element k of an access (k = 0..N_PE-1) with origin (y,x) and interval r is
//   horizontal (y, x+k*r), vertical (y+k*r, x), block (y+(k/BQ)*r, x+(k%BQ)*r)
// and lies in module (mu(y,x) + k*d) mod M_MOD with d = r (H, B) or BQ*r (V).
// Because M_MOD is prime and larger than N_PE these are distinct whenever r is
// not a multiple of M_MOD.
package pps_pkg;

  typedef enum logic [1:0] {
    ACC_H   = 2'd0,   // horizontal, constant interval
    ACC_V   = 2'd1,   // vertical, constant interval
    ACC_B   = 2'd2,   // 2x2 block, constant interval
    ACC_RSV = 2'd3    // reserved: treated as an access with no elements
  } acc_t;

  localparam int unsigned INTV_W = 4;   // interval r = 1..15
  localparam int unsigned CRD_W  = 10;  // signed coordinate width used inside the address path
  localparam int unsigned BQ     = 2;   // width of the 2x2 block

  // ---------------------------------------------------------------- ISA
  // 32-bit instruction word, opcode in [31:27].
  //   general : [26:24] rd  [23:21] rs  [20:18] rt  [15:0] imm
  //   memory  : [26:24] reg [23:22] type [21:18] intv [17:9] dy  [8:0] dx
  // dy, dx are signed offsets added to the scan position held by the
  // instruction issue unit.
  typedef enum logic [4:0] {
    OP_NOP   = 5'd0,
    OP_LDI   = 5'd1,   // rd = imm
    OP_MOV   = 5'd2,   // rd = rs
    OP_ADD   = 5'd3,   // rd = rs + rt
    OP_SUB   = 5'd4,   // rd = rs - rt
    OP_ABSD  = 5'd5,   // rd = |rs - rt|
    OP_MIN   = 5'd6,   // rd = min(rs, rt), unsigned
    OP_MAX   = 5'd7,   // rd = max(rs, rt), unsigned
    OP_AND   = 5'd8,
    OP_OR    = 5'd9,
    OP_XOR   = 5'd10,
    OP_SHL   = 5'd11,  // rd = rs << imm[3:0]
    OP_SHR   = 5'd12,  // rd = rs >> imm[3:0]
    OP_SLT   = 5'd13,  // rd = (rs < rt) unsigned
    OP_IN    = 5'd14,  // I/O: rd = word broadcast by the issue unit
    OP_OUT   = 5'd15,  // I/O: PE output port = rs
    OP_LOAD  = 5'd16,  // memory reference: reg = element k of the access
    OP_STORE = 5'd17   // memory reference: element k of the access = reg
  } opcode_t;

  function automatic logic is_mem_op(logic [4:0] op);
    return op == OP_LOAD || op == OP_STORE;
  endfunction

  function automatic logic is_gen_op(logic [4:0] op);
    return op <= 5'd15;
  endfunction


  // Offset of element k from the access origin, in rows (elem_dy) and columns (elem_dx).
  function automatic int elem_dy(acc_t acc, logic [INTV_W-1:0] intv, int unsigned k);
    unique case (acc)
      ACC_V:   return int'(k) * int'(intv);
      ACC_B:   return int'(k / BQ) * int'(intv);
      default: return 0;
    endcase
  endfunction

  function automatic int elem_dx(acc_t acc, logic [INTV_W-1:0] intv, int unsigned k);
    unique case (acc)
      ACC_H:   return int'(k) * int'(intv);
      ACC_B:   return int'(k % BQ) * int'(intv);
      default: return 0;
    endcase
  endfunction

  // Module step d between consecutive elements of an access.
  function automatic int unsigned module_step(acc_t acc, logic [INTV_W-1:0] intv,
                                              int unsigned m_mod);
    return (acc == ACC_V) ? (BQ * int'(intv)) % m_mod : int'(intv) % m_mod;
  endfunction

  // Integer helpers usable in parameter expressions.
  function automatic int unsigned ceil_div(int unsigned a, int unsigned b);
    return (a + b - 1) / b;
  endfunction

endpackage
