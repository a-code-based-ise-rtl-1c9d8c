// cbm_pkg: types and constants shared by the code-based-masking (CBM) datapath.
//
// The CBM extension adds three custom RISC-V opcodes. Computation instructions
// decode their operands with the code-based decoder, run an ordinary ALU
// operation and re-encode the result; PRG-management instructions control the
// pseudorandom generator that supplies refresh randomness. The opcode values,
// the funct3 values and the field layout follow the CBM instruction encoding.
// The ALU operation enumeration, the decoded-control struct and the PRG
// geometry constants (100-bit Keccak-p state, 16-bit output) are collected here
// so that the decoder, the wrapped ALU, the PRG and the core agree on them.
package cbm_pkg;

  localparam int unsigned XLEN = 32;

  // Opcodes (instr[6:0]).
  localparam logic [6:0] OPC_CBM_RR  = 7'b0001011; // cbm.and/or/xor/sll/srl
  localparam logic [6:0] OPC_CBM_RI  = 7'b0101011; // cbm.andi/ori/xori/slli/srli
  localparam logic [6:0] OPC_CBM_PRG = 7'b1011011; // cbm.prg/s2r/r2s
  localparam logic [6:0] OPC_OP      = 7'b0110011; // RV32I register-register
  localparam logic [6:0] OPC_OP_IMM  = 7'b0010011; // RV32I register-immediate
  localparam logic [6:0] OPC_LUI     = 7'b0110111;

  // funct3 of the CBM computation instructions.
  localparam logic [2:0] CBM_F3_AND = 3'b000;
  localparam logic [2:0] CBM_F3_OR  = 3'b001;
  localparam logic [2:0] CBM_F3_XOR = 3'b010;
  localparam logic [2:0] CBM_F3_SLL = 3'b011;
  localparam logic [2:0] CBM_F3_SRL = 3'b100;

  // funct3 of the PRG-management instructions.
  localparam logic [2:0] PRG_F3_PRG = 3'b000;
  localparam logic [2:0] PRG_F3_S2R = 3'b001;
  localparam logic [2:0] PRG_F3_R2S = 3'b010;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR,  ALU_AND
  } alu_op_e;

  // PRG operations selected by the 2-bit immediate of cbm.prg.
  typedef enum logic [1:0] {
    PRG_RESEED   = 2'd0, // reload the state from the current seed
    PRG_STEP     = 2'd1, // one manual update (only while auto mode is off)
    PRG_AUTO_OFF = 2'd2, // stop updating every cycle
    PRG_AUTO_ON  = 2'd3  // update every cycle
  } prg_op_e;

  // PRG geometry: Keccak-p[100] state, 16-bit rate (output), 84-bit capacity.
  localparam int unsigned PRG_B  = 100;
  localparam int unsigned PRG_R  = 16;
  localparam int unsigned PRG_NR = 16;   // rounds of Keccak-p[100] before the index wraps

  // Control word produced by the decoder.
  typedef struct packed {
    logic        legal;      // a supported instruction
    logic        rf_we;      // writes rd
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic        rs1_en;     // rs1 is read
    logic        rs2_en;     // rs2 is read
    alu_op_e     alu_op;
    logic        opb_imm;    // operand b is the immediate
    logic [31:0] imm;
    logic        lui;        // operand a is zero (lui)
    logic        cbm_opa_sel;// decode operand a
    logic        cbm_opb_sel;// decode operand b
    logic [1:0]  cbm_enc_sel;// [0]: XOR PRG bits into result MSBs, [1]: encode result
    logic        prg_op_en;  // cbm.prg
    prg_op_e     prg_op;
    logic        prg_s2r;    // cbm.s2r: rd <- PRG state slice
    logic        prg_r2s;    // cbm.r2s: PRG seed slice <- rs1
    logic [1:0]  prg_part;   // 32-bit slice selector of s2r/r2s
  } ctrl_t;

endpackage
