// tb_xinterval_fregfile: self-checking testbench of xinterval_fregfile.
// Random writes on both ports and random reads on all four read ports are
// compared, cycle by cycle, with an array model; same-register writes on
// both ports check that the interval-result port wins, and reset must clear
// every register. 10 ns clock.
module tb_xinterval_fregfile;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic [4:0]  ra1, ra2, ra3, ra4, wa_a, wa_b;
  logic [63:0] rd1, rd2, rd3, rd4, wd_a, wd_b;
  logic        we_a, we_b;
  logic [63:0] model [32];
  int checks = 0, failures = 0, clashes = 0;

  xinterval_fregfile dut (.clk(clk), .rst_n(rst_n),
    .ra1(ra1), .ra2(ra2), .ra3(ra3), .ra4(ra4),
    .rd1(rd1), .rd2(rd2), .rd3(rd3), .rd4(rd4),
    .we_a(we_a), .wa_a(wa_a), .wd_a(wd_a),
    .we_b(we_b), .wa_b(wa_b), .wd_b(wd_b));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    checks++;
    if (rd1 != model[ra1] || rd2 != model[ra2] || rd3 != model[ra3] || rd4 != model[ra4]) begin
      failures++;
      $display("FAIL read %0d %0d %0d %0d", ra1, ra2, ra3, ra4);
    end
  endtask

  initial begin
    we_a = 0; we_b = 0; wa_a = 0; wa_b = 0; wd_a = 0; wd_b = 0;
    ra1 = 0; ra2 = 0; ra3 = 0; ra4 = 0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1'b1;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 32; i++) begin ra1 = 5'(i); #1 check_reads(); end
    for (int i = 0; i < 3000; i++) begin
      we_a = 1'($urandom); we_b = 1'($urandom);
      wa_a = 5'($urandom); wa_b = (i % 10 == 0) ? wa_a : 5'($urandom);
      wd_a = {$urandom, $urandom}; wd_b = {$urandom, $urandom};
      ra1 = 5'($urandom); ra2 = 5'($urandom); ra3 = 5'($urandom); ra4 = 5'($urandom);
      #1 check_reads();
      @(posedge clk);
      if (we_b) model[wa_b] = wd_b;
      if (we_a) model[wa_a] = wd_a;
      if (we_a && we_b && wa_a == wa_b) clashes++;
      #1;
    end
    checks++;
    if (clashes == 0) begin failures++; $display("FAIL no write clash exercised"); end
    rst_n = 1'b0; we_a = 0; we_b = 0;
    @(posedge clk); #1 rst_n = 1'b1;
    foreach (model[i]) model[i] = '0;
    for (int i = 0; i < 32; i++) begin ra2 = 5'(i); #1 check_reads(); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
