// fgpu_pkg: constants, instruction format and request/response types shared by
// the FGPU modules.
//
// The architecture numbers (8 PEs per compute unit, 8 wavefronts per CU, 64
// work-items per wavefront, 32 registers of 32 bit per work-item) follow the
// FGPU description. The binary instruction encoding, the Link RAM layout and the
// request formats are this design's own choices, since the ISA is only given as
// assembly text. Instruction word layout:
//   [31:26] opcode  [25:21] rd  [20:16] rs  [15:11] rt  [15:0] immediate
// LW/SW use rd as data register, rs as base pointer and rt as word index
// (byte address = rs + 4*rt). BNE compares rd with rs and jumps to the absolute
// CRAM word address in the immediate. LID/WGOFF take the dimension in imm[1:0].
// The index space has up to three dimensions; work-group sizes are powers of
// two in each dimension so that the local coordinates are bit fields of the
// work-item's number inside its work-group.
package fgpu_pkg;

  localparam int unsigned N_PE      = 8;    // PEs per compute unit
  localparam int unsigned N_WF      = 8;    // wavefront slots per compute unit
  localparam int unsigned WF_SIZE   = 64;   // work-items per wavefront
  localparam int unsigned N_CYC     = WF_SIZE / N_PE; // cycles per instruction
  localparam int unsigned N_REGS    = 32;   // registers per work-item
  localparam int unsigned TAG_W     = 6;    // CU request tag (64 requests per WF)

  // Link RAM word map
  localparam int unsigned LRAM_KSTART     = 0; // first CRAM word of the kernel
  localparam int unsigned LRAM_GSIZE      = 1; // words 1..3: work-items in dimension 0, 1, 2
  localparam int unsigned LRAM_WGSIZE     = 4; // words 4..6: work-group size per dimension
                                               // (powers of two, product 64..512)
  localparam int unsigned LRAM_PARAM_BASE = 8; // kernel parameter n at LRAM_PARAM_BASE+n

  // one value per dimension of the index space
  typedef logic [2:0][31:0] idx3_t;

  // position of the highest set bit (log2 of a power of two), 0 for 0 and 1
  function automatic logic [3:0] log2_pow2(logic [31:0] v);
    logic [3:0] r;
    r = '0;
    for (int b = 1; b < 16; b++) if (v[b]) r = 4'(b);
    return r;
  endfunction

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_ADD   = 6'd1,
    OP_ADDI  = 6'd2,
    OP_LID   = 6'd3,
    OP_WGOFF = 6'd4,
    OP_LP    = 6'd5,
    OP_LW    = 6'd6,
    OP_SW    = 6'd7,
    OP_MACC  = 6'd8,
    OP_BNE   = 6'd9,
    OP_RET   = 6'd10
  } opcode_e;

  typedef struct packed {
    opcode_e     op;
    logic [4:0]  rd;
    logic [4:0]  rs;
    logic [15:0] imm;   // rt is imm[15:11]
  } instr_t;

  function automatic logic [4:0] instr_rt(instr_t i);
    return i.imm[15:11];
  endfunction

  function automatic logic [31:0] enc_r(opcode_e op, int rd, int rs, int rt);
    return {op, 5'(rd), 5'(rs), 5'(rt), 11'd0};
  endfunction

  function automatic logic [31:0] enc_i(opcode_e op, int rd, int rs, int imm);
    return {op, 5'(rd), 5'(rs), 16'(imm)};
  endfunction

  // CU -> global memory controller request
  typedef struct packed {
    logic              we;
    logic [31:0]       addr;   // byte address, word aligned
    logic [31:0]       wdata;
    logic [TAG_W-1:0]  tag;
  } mem_req_t;

  // global memory controller -> CU response (loads return data, stores an ack)
  typedef struct packed {
    logic [31:0]       rdata;
    logic [TAG_W-1:0]  tag;
  } mem_rsp_t;

endpackage
