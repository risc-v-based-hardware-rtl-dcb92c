// xinterval_top: the interval instruction-set extension as one block:
// instruction decoder, the floating-point register file holding intervals,
// and the interval execution unit.
//
// The host core hands over one instruction word per cycle on instr/instr_valid.
// In that cycle the decoder picks the operation and registers, the register
// file supplies rs1/rs2/rs3 and the execution unit computes the result; at
// the next clock edge it is written to rd. An instruction may therefore use
// the result of the one just before it: the extension accepts one
// instruction per cycle, latency 1 cycle, with no stalls. instr_illegal flags,
// in the same cycle, a word that is not an interval instruction; nothing is
// written for it. res_valid/res_rd/res_data repeat each write for one cycle.
// ld_* writes a register from memory (fld) and st_addr/st_data read one
// (fsd), so loads and stores stay with the host's standard F/D
// instructions, as the document intends. An interval result and a load must
// not target the same register in the same cycle (checked by an assertion).
// Active-low synchronous reset.
module xinterval_top
  import xinterval_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        instr_valid,
  input  logic [31:0] instr,
  output logic        instr_illegal,
  input  logic        ld_valid,
  input  logic [4:0]  ld_addr,
  input  logic [63:0] ld_data,
  input  logic [4:0]  st_addr,
  output logic [63:0] st_data,
  output logic        res_valid,
  output logic [4:0]  res_rd,
  output itv_t        res_data
);

  logic        dec_valid;
  itv_op_e     op;
  logic [4:0]  rd, rs1, rs2, rs3;
  logic [63:0] d1, d2, d3;
  itv_t        r;
  logic        we;

  xinterval_decoder u_dec (
    .instr(instr), .valid(dec_valid), .op(op),
    .rd(rd), .rs1(rs1), .rs2(rs2), .rs3(rs3)
  );

  assign we            = instr_valid && dec_valid;
  assign instr_illegal = instr_valid && !dec_valid;

  xinterval_fregfile #(.NREGS(32), .DATA_W(64)) u_rf (
    .clk(clk), .rst_n(rst_n),
    .ra1(rs1), .ra2(rs2), .ra3(rs3), .ra4(st_addr),
    .rd1(d1), .rd2(d2), .rd3(d3), .rd4(st_data),
    .we_a(we), .wa_a(rd), .wd_a(r),
    .we_b(ld_valid), .wa_b(ld_addr), .wd_b(ld_data)
  );

  xinterval_unit u_exec (.op(op), .a(itv_t'(d1)), .b(itv_t'(d2)), .c(itv_t'(d3)), .r(r));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_rd    <= '0;
      res_data  <= ITV_EMPTY;
    end else begin
      res_valid <= we;
      res_rd    <= rd;
      res_data  <= r;
    end
  end

  a_no_write_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(we && ld_valid && rd == ld_addr));

endmodule
