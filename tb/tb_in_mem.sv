// tb_in_mem: self-checking test of the input memory, with ping-pong banks (as input
// memory A) and with one bank (as input memory B). Checks byte-masked writes, the
// one-cycle read, that writes go to the bank not being read, and bank swapping.
module tb_in_mem;
  localparam int VEC = 8, D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                swap, we, re;
  logic [3:0]          wa, ra;
  logic [VEC-1:0]      be;
  logic [VEC-1:0][7:0] wd, rd, rd1;
  logic                bank, bank1;

  in_mem #(.VEC(VEC), .DEPTH(D), .BANKS(2)) dut  (.clk, .rst_n, .swap, .wr_en(we), .wr_addr(wa),
      .wr_be(be), .wr_data(wd), .rd_en(re), .rd_addr(ra), .rd_data(rd), .rd_bank(bank));
  in_mem #(.VEC(VEC), .DEPTH(D), .BANKS(1)) dut1 (.clk, .rst_n, .swap, .wr_en(we), .wr_addr(wa),
      .wr_be(be), .wr_data(wd), .rd_en(re), .rd_addr(ra), .rd_data(rd1), .rd_bank(bank1));

  logic [7:0] model  [2][D][VEC];
  logic [7:0] model1 [D][VEC];
  int rb;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [VEC-1:0] m, logic [VEC-1:0][7:0] v);
    @(negedge clk);
    we = 1; wa = 4'(a); be = m; wd = v;
    @(negedge clk);
    we = 0;
    for (int b = 0; b < VEC; b++) if (m[b]) begin
      model[1-rb][a][b] = v[b];
      model1[a][b] = v[b];
    end
  endtask

  task automatic rdchk(int a);
    @(negedge clk);
    re = 1; ra = 4'(a);
    @(negedge clk);
    re = 0;
    for (int b = 0; b < VEC; b++) begin
      checks += 2;
      if (rd[b] != model[rb][a][b]) begin failures++; $display("A bank %0d addr %0d byte %0d", rb, a, b); end
      if (rd1[b] != model1[a][b])   begin failures++; $display("B addr %0d byte %0d", a, b); end
    end
  endtask

  initial begin
    swap = 0; we = 0; re = 0; wa = '0; ra = '0; be = '0; wd = '0; rb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // fill every word of both banks and the single bank
    for (int k = 0; k < 2; k++) begin
      for (int a = 0; a < D; a++) wr(a, '1, {$urandom, $urandom});
      @(negedge clk); swap = 1; @(negedge clk); swap = 0; rb = 1 - rb;
      checks++;
      if (bank != rb[0]) begin failures++; $display("bank did not swap"); end
    end
    for (int n = 0; n < 300; n++) begin
      case ($urandom % 4)
        0, 1: wr($urandom % D, VEC'($urandom), {$urandom, $urandom});
        2: rdchk($urandom % D);
        3: begin @(negedge clk); swap = 1; @(negedge clk); swap = 0; rb = 1 - rb; end
      endcase
    end
    checks++;
    if (bank1 != 1'b0) begin failures++; $display("single-bank memory swapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
