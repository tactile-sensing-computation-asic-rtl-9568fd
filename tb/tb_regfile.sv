// tb_regfile: self-checking test of the register file: reset to zero, random writes,
// both combinational read ports checked against a reference array.
module tb_regfile;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic        we;
  logic [2:0]  wa, ra0, ra1;
  logic [31:0] wd, rd0, rd1;
  logic [31:0] model [8];

  regfile #(.NREGS(8), .W(32)) dut (.clk, .rst_n, .wr_en(we), .wr_addr(wa), .wr_data(wd),
      .rd_addr0(ra0), .rd_data0(rd0), .rd_addr1(ra1), .rd_data1(rd1));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = '0; wd = '0; ra0 = '0; ra1 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 8; r++) begin
      model[r] = '0;
      ra0 = 3'(r); ra1 = 3'(7 - r); #1;
      checks += 2;
      if (rd0 != 0 || rd1 != 0) begin failures++; $display("register %0d not reset", r); end
    end
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      we = $urandom % 2; wa = 3'($urandom); wd = $urandom;
      ra0 = 3'($urandom); ra1 = 3'($urandom);
      #1;
      checks += 2;
      if (rd0 != model[ra0]) begin failures++; $display("port 0 reg %0d", ra0); end
      if (rd1 != model[ra1]) begin failures++; $display("port 1 reg %0d", ra1); end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
