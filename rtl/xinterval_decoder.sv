// xinterval_decoder: decodes a 32-bit RISC-V instruction word of the
// interval extension into an operation and register indices.
//
// Combinational. R-type instructions use the custom-0 opcode (0001011):
//   funct3 = 100, funct7 = 0/1/2/3 : addfwctc, subfwctc, mulfwctc, divfwctc
//   funct3 = 101, funct7 = 4..9    : sqrtfwctc, sqrfwctc, expfwctc, logfwctc,
//                                    cosfwctc, sinfwctc ("D,S")
//   funct3 = 110, funct7 = 4/5/6/7 : sqrtbwctc, sqrbwctc, expbwctc, logbwctc ("D,S,T")
// Three-source backward contractors use the R4 format (rs3 in [31:27],
// funct2 in [26:25]) on the custom-1 opcode (0101011):
//   funct3 = 000 : <op>bwctc1, funct3 = 001 : <op>bwctc2,
//   funct2 = 0/1/2/3 selects add, sub, mul, div.
// The custom opcodes, the R-type forward encodings of add/sub/mul/div and the
// use of R4 for three-input backward contractors follow the document; the
// other funct values are this design's choice. Anything else, including the
// backward codes 8 and 9 kept for cos and sin, decodes as illegal
// (valid = 0, op = OP_NONE).
module xinterval_decoder
  import xinterval_pkg::*;
(
  input  logic [31:0] instr,
  output logic        valid,
  output itv_op_e     op,
  output logic [4:0]  rd,
  output logic [4:0]  rs1,
  output logic [4:0]  rs2,
  output logic [4:0]  rs3
);

  logic [6:0] opcode, funct7;
  logic [2:0] funct3;
  logic [1:0] funct2;

  assign opcode = instr[6:0];
  assign rd     = instr[11:7];
  assign funct3 = instr[14:12];
  assign rs1    = instr[19:15];
  assign rs2    = instr[24:20];
  assign funct2 = instr[26:25];
  assign funct7 = instr[31:25];
  assign rs3    = instr[31:27];

  always_comb begin
    op = OP_NONE;
    if (opcode == OPC_CUSTOM0) begin
      unique case (funct3)
        F3_FW2: begin
          unique case (funct7)
            PRIM_ADD: op = OP_ADD_FW;
            PRIM_SUB: op = OP_SUB_FW;
            PRIM_MUL: op = OP_MUL_FW;
            PRIM_DIV: op = OP_DIV_FW;
            default:  op = OP_NONE;
          endcase
        end
        F3_FW1: begin
          if (funct7 == PRIM_SQRT)     op = OP_SQRT_FW;
          else if (funct7 == PRIM_SQR) op = OP_SQR_FW;
          else if (funct7 == PRIM_EXP) op = OP_EXP_FW;
          else if (funct7 == PRIM_LOG) op = OP_LOG_FW;
          else if (funct7 == PRIM_COS) op = OP_COS_FW;
          else if (funct7 == PRIM_SIN) op = OP_SIN_FW;
        end
        F3_BW1: begin
          if (funct7 == PRIM_SQRT)     op = OP_SQRT_BW;
          else if (funct7 == PRIM_SQR) op = OP_SQR_BW;
          else if (funct7 == PRIM_EXP) op = OP_EXP_BW;
          else if (funct7 == PRIM_LOG) op = OP_LOG_BW;
        end
        default: op = OP_NONE;
      endcase
    end else if (opcode == OPC_CUSTOM1 && (funct3 == F3_R4_BW1 || funct3 == F3_R4_BW2)) begin
      unique case (funct2)
        2'd0:    op = (funct3 == F3_R4_BW1) ? OP_ADD_BW1 : OP_ADD_BW2;
        2'd1:    op = (funct3 == F3_R4_BW1) ? OP_SUB_BW1 : OP_SUB_BW2;
        2'd2:    op = (funct3 == F3_R4_BW1) ? OP_MUL_BW1 : OP_MUL_BW2;
        default: op = (funct3 == F3_R4_BW1) ? OP_DIV_BW1 : OP_DIV_BW2;
      endcase
    end
    valid = op != OP_NONE;
  end

endmodule
