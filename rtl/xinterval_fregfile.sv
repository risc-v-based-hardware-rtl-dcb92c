// xinterval_fregfile: the 32-entry floating-point register file f0..f31 in
// which intervals live, one 64-bit interval per register.
//
// Three combinational read ports feed the operands rs1, rs2 and rs3 of an
// interval instruction; a fourth read port lets the host core store a
// register to memory (fsd). Two synchronous write ports: one for the result
// of the interval unit and one for the host core loading a register from
// memory (fld). If both write the same register in one cycle the interval
// result wins. A write is visible on the read ports from the next cycle on.
// Active-low synchronous reset clears every register, which encodes [0, 0].
// That intervals occupy 64-bit D registers follows the document; the port
// set and the reset are this design's choice.
module xinterval_fregfile #(
  parameter int unsigned NREGS  = 32,
  parameter int unsigned DATA_W = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  input  logic [$clog2(NREGS)-1:0] ra3,
  input  logic [$clog2(NREGS)-1:0] ra4,
  output logic [DATA_W-1:0]        rd1,
  output logic [DATA_W-1:0]        rd2,
  output logic [DATA_W-1:0]        rd3,
  output logic [DATA_W-1:0]        rd4,
  input  logic                     we_a,
  input  logic [$clog2(NREGS)-1:0] wa_a,
  input  logic [DATA_W-1:0]        wd_a,
  input  logic                     we_b,
  input  logic [$clog2(NREGS)-1:0] wa_b,
  input  logic [DATA_W-1:0]        wd_b
);

  logic [DATA_W-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else begin
      if (we_b) regs[wa_b] <= wd_b;
      if (we_a) regs[wa_a] <= wd_a;
    end
  end

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];
  assign rd3 = regs[ra3];
  assign rd4 = regs[ra4];

endmodule
