// tb_xinterval_decoder: self-checking testbench of xinterval_decoder. Every
// interval instruction is built with random register fields and the decoded
// operation and register indices are compared with the encoding table;
// unused funct codes, the backward codes 8 and 9 (cos, sin) and random
// standard opcodes must decode as illegal. Combinational.
module tb_xinterval_decoder;
  import tb_asm_pkg::*;
  import xinterval_pkg::*;

  logic [31:0] instr;
  logic        valid;
  itv_op_e     op;
  logic [4:0]  rd, rs1, rs2, rs3;
  int checks = 0, failures = 0;

  xinterval_decoder dut (.instr(instr), .valid(valid), .op(op),
                         .rd(rd), .rs1(rs1), .rs2(rs2), .rs3(rs3));

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_op(itv_op_e exp_op, int d, int s1, int s2, int s3, bit r4);
    #1;
    checks++;
    if (!valid || op != exp_op || rd != 5'(d) || rs1 != 5'(s1) ||
        (exp_op inside {OP_SQR_FW, OP_SQRT_FW, OP_EXP_FW, OP_LOG_FW, OP_COS_FW, OP_SIN_FW} ? 1'b0 : rs2 != 5'(s2)) ||
        (r4 && rs3 != 5'(s3))) begin
      failures++;
      $display("FAIL %h: valid=%0d op=%s expected %s", instr, valid, op.name(), exp_op.name());
    end
  endtask

  task automatic expect_illegal();
    #1;
    checks++;
    if (valid || op != OP_NONE) begin
      failures++;
      $display("FAIL %h should be illegal, got %s", instr, op.name());
    end
  endtask

  initial begin
    int d, s1, s2, s3;
    itv_op_e fw [4] = '{OP_ADD_FW, OP_SUB_FW, OP_MUL_FW, OP_DIV_FW};
    itv_op_e b1 [4] = '{OP_ADD_BW1, OP_SUB_BW1, OP_MUL_BW1, OP_DIV_BW1};
    itv_op_e b2 [4] = '{OP_ADD_BW2, OP_SUB_BW2, OP_MUL_BW2, OP_DIV_BW2};
    // the four encodings printed for the forward contractors
    instr = 32'b0000000_00010_00001_100_00011_0001011; expect_op(OP_ADD_FW, 3, 1, 2, 0, 0);
    instr = 32'b0000001_00010_00001_100_00011_0001011; expect_op(OP_SUB_FW, 3, 1, 2, 0, 0);
    instr = 32'b0000010_00010_00001_100_00011_0001011; expect_op(OP_MUL_FW, 3, 1, 2, 0, 0);
    instr = 32'b0000011_00010_00001_100_00011_0001011; expect_op(OP_DIV_FW, 3, 1, 2, 0, 0);
    for (int i = 0; i < 200; i++) begin
      d = $urandom % 32; s1 = $urandom % 32; s2 = $urandom % 32; s3 = $urandom % 32;
      for (int p = 0; p < 4; p++) begin
        instr = fwctc(p, d, s1, s2);     expect_op(fw[p], d, s1, s2, s3, 0);
        instr = bwctc1(p, d, s1, s2, s3); expect_op(b1[p], d, s1, s2, s3, 1);
        instr = bwctc2(p, d, s1, s2, s3); expect_op(b2[p], d, s1, s2, s3, 1);
      end
      instr = sqrtfwctc(d, s1);     expect_op(OP_SQRT_FW, d, s1, s2, s3, 0);
      instr = sqrfwctc(d, s1);      expect_op(OP_SQR_FW, d, s1, s2, s3, 0);
      instr = sqrtbwctc(d, s1, s2); expect_op(OP_SQRT_BW, d, s1, s2, s3, 0);
      instr = sqrbwctc(d, s1, s2);  expect_op(OP_SQR_BW, d, s1, s2, s3, 0);
      instr = expfwctc(d, s1);      expect_op(OP_EXP_FW, d, s1, s2, s3, 0);
      instr = logfwctc(d, s1);      expect_op(OP_LOG_FW, d, s1, s2, s3, 0);
      instr = expbwctc(d, s1, s2);  expect_op(OP_EXP_BW, d, s1, s2, s3, 0);
      instr = logbwctc(d, s1, s2);  expect_op(OP_LOG_BW, d, s1, s2, s3, 0);
      instr = cosfwctc(d, s1);      expect_op(OP_COS_FW, d, s1, s2, s3, 0);
      instr = sinfwctc(d, s1);      expect_op(OP_SIN_FW, d, s1, s2, s3, 0);
      // not interval instructions
      instr = r_type(4 + $urandom % 124, 3'b100, d, s1, s2); expect_illegal();
      instr = r_type(10 + $urandom % 118, 3'b101, d, s1, s2); expect_illegal();
      instr = r_type(8 + $urandom % 120, 3'b110, d, s1, s2); expect_illegal();
      instr = r_type($urandom % 4, 3'b101 + $urandom % 2, d, s1, s2); expect_illegal();
      instr = r_type($urandom % 8, 3'b000, d, s1, s2);       expect_illegal();
      instr = r4_type($urandom % 4, 2 + $urandom % 6, d, s1, s2, s3); expect_illegal();
      instr = $urandom; instr[6:0] = 7'b0110011;             expect_illegal();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
