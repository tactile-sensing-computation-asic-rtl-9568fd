// tb_wmem: self-checking test of the wmem memory. Random writes and reads against a
// reference array; checks the one-cycle read latency and that the read data holds
// while no read is issued.
module tb_wmem;
  localparam int D = 32, W = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic            we, re;
  logic [5-1:0]  wa, ra;
  logic [W-1:0]    wd, rd;
  logic [W-1:0]    model [D];
  logic [W-1:0]    last;

  wmem #(.VEC(8), .DEPTH(32)) dut (.clk, .wr_en(we), .wr_addr(wa), .wr_data(wd), .rd_en(re), .rd_addr(ra), .rd_data(rd));

  function automatic logic [W-1:0] rnd();
    return W'({$urandom, $urandom});
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; re = 0; wa = '0; ra = '0; wd = '0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; wa = 5'(a); wd = rnd(); model[a] = wd;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      we = $urandom % 2; wa = 5'($urandom); wd = rnd();
      re = $urandom % 2; ra = 5'($urandom);
      if (re && we && ra == wa) re = 0;   // read-during-write to the same row is not defined
      @(posedge clk);
      if (re) last = model[ra];
      if (we) model[wa] = wd;
      @(negedge clk);
      we = 0; re = 0;
      checks++;
      if (rd != last) begin failures++; $display("wmem read mismatch: got %h exp %h", rd, last); end
      @(negedge clk);
      checks++;
      if (rd != last) begin failures++; $display("wmem read data did not hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
