// imap_pkg: types and constants shared by the IMAP-CE style PE array and its
// external memory interface.
//
// A PE instruction bundle has four slots, matching the 4-way VLIW PE: an ADD
// slot (arithmetic, grouping and scalar substitution), a LOG slot (logic,
// shifts and status collection), a MUL slot (multiply and inter-PE moves) and
// an LSU slot (IMEM load/store). Each slot names up to three registers and
// carries a mask bit: when the mask bit is 1, PEs whose mr is 0 do not write
// back. The mnemonics follow the representative PE instruction set; the
// opcode encodings, the slot each operation sits in, and the extra logic,
// shift and mask-control operations are this design's own choices.
package imap_pkg;

  localparam int unsigned RW   = 5;   // register index width (24 registers)
  localparam int unsigned SW   = 16;  // scalar (CP) data width

  // ADD slot: arithmetic, PE grouping and scalar substitution
  typedef enum logic [3:0] {
    A_NOP  = 4'd0,
    A_ADD  = 4'd1,   // ir3 = ir1 + ir2 (sets carry)
    A_SUB  = 4'd2,   // ir3 = ir1 - ir2 (sets borrow)
    A_SADD = 4'd3,   // ir3 = sat(ir1 + ir2), unsigned
    A_SSUB = 4'd4,   // ir3 = sat(ir1 - ir2), unsigned
    A_ABS  = 4'd5,   // ir3 = |ir1 - ir2|
    A_MAX  = 4'd6,   // ir3 = max(ir1, ir2, ir3)
    A_MIN  = 4'd7,   // ir3 = min(ir1, ir2, ir3)
    A_MV   = 4'd8,   // ir3 = ir1
    A_MV2  = 4'd9,   // ir3 = cr1 (scalar broadcast)
    A_PDP  = 4'd10,  // ir3 of PE(cr1) = ped (ped sent as scalar cr2)
    A_MIF  = 4'd11,  // mr = fs(c, ir1-ir2) & mr ; mf = ~fs & mr
    A_MIFC = 4'd12,  // as mif, with the previous borrow (16b compare)
    A_MELSE= 4'd13,  // swap mr and mf
    A_MEND = 4'd14   // mr = mr | mf ; mf = 0
  } add_op_e;

  // LOG slot: logic, shifts, status collection
  typedef enum logic [3:0] {
    L_NOP = 4'd0,
    L_AND = 4'd1,
    L_OR  = 4'd2,
    L_XOR = 4'd3,
    L_NOT = 4'd4,    // ir3 = ~ir1
    L_SLL = 4'd5,    // ir3 = ir1 << 1
    L_SRL = 4'd6,    // ir3 = ir1 >> 1
    L_SRA = 4'd7,    // ir3 = ir1 >>> 1
    L_STS = 4'd8,    // ped = OR over all PEs of ir1
    L_SML = 4'd9     // keep only the leftmost mr that is 1 (cleared ones are ORed into mf)
  } log_op_e;

  // MUL slot: multiplier and inter-PE communication (COMM)
  typedef enum logic [2:0] {
    M_NOP  = 3'd0,
    M_MUL  = 3'd1,   // ir3P = ir1 * ir2
    M_MVR  = 3'd2,   // ir3  = ir1 of left PE
    M_MVL  = 3'd3,   // ir3  = ir1 of right PE
    M_MVRP = 3'd4,   // ir3P = ir1P of left PE
    M_MVLP = 3'd5    // ir3P = ir1P of right PE
  } mul_op_e;

  // LSU slot
  typedef enum logic [2:0] {
    S_NOP = 3'd0,
    S_LD  = 3'd1,    // ir3 = IMEM[cr1 + cr2]
    S_ST  = 3'd2,    // IMEM[cr1 + cr2] = ir1
    S_LDT = 3'd3,    // ir3 = IMEM[cr1 + ir2P]
    S_STT = 3'd4     // IMEM[cr1 + ir2P] = ir1
  } lsu_op_e;

  // Flag types selected by the ir3 field of mif/mifc (unsigned/signed compare)
  typedef enum logic [2:0] {
    F_EQ = 3'd0, F_NE = 3'd1, F_LTU = 3'd2, F_GEU = 3'd3,
    F_LT = 3'd4, F_GE = 3'd5, F_GTU = 3'd6, F_LEU = 3'd7
  } flag_e;

  typedef struct packed {
    logic          mask;
    logic [RW-1:0] r1, r2, r3;
  } fields_t;

  typedef struct packed { add_op_e op; fields_t f; } add_slot_t;
  typedef struct packed { log_op_e op; fields_t f; } log_slot_t;
  typedef struct packed { mul_op_e op; fields_t f; } mul_slot_t;
  typedef struct packed { lsu_op_e op; fields_t f; } lsu_slot_t;

  // One broadcast PE instruction bundle (BC1)
  typedef struct packed {
    add_slot_t a;
    log_slot_t l;
    mul_slot_t m;
    lsu_slot_t s;
  } pe_instr_t;

  // Scalar data sent one stage later (BC2): cr1 and cr2
  typedef struct packed {
    logic [SW-1:0] cr1;
    logic [SW-1:0] cr2;
  } pe_scalar_t;

  // An all-NOP bundle, for control code and testbenches that drive the array
  // (not used inside the RTL itself).
  localparam pe_instr_t PE_NOP = '0;

  // ---- external memory (EMEM) word port shared by CP, host and DMA -------
  localparam int unsigned MAW = 23;   // 64-bit word address: 64MB
  localparam int unsigned MDW = 64;

  typedef struct packed {
    logic           valid;
    logic           we;
    logic [MAW-1:0] addr;
    logic [MDW-1:0] wdata;
  } mem_req_t;

  typedef struct packed {
    logic           rvalid;
    logic [MDW-1:0] rdata;
  } mem_rsp_t;

  // ---- DMA request descriptor -------------------------------------------
  typedef enum logic [1:0] {
    D_I2E = 2'd0,    // IMEM rows  -> EMEM
    D_E2I = 2'd1,    // EMEM       -> IMEM rows
    D_S2E = 2'd2     // video SR line -> EMEM
  } dma_dir_e;

  typedef struct packed {
    dma_dir_e       dir;
    logic [1:0]     sr_ch;      // video channel for D_S2E
    logic [10:0]    imem_addr;  // first IMEM row
    logic [MAW-1:0] emem_addr;  // first 64b word in EMEM
    logic [MAW-1:0] emem_pitch; // words between rows in EMEM
    logic [10:0]    rows;       // number of rows (lines)
    logic [8:0]     step;       // scaler step, 1/64 input pixel per output pixel
  } dma_desc_t;

endpackage
