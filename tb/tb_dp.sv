// tb_dp: self-checking test of one dot product lane.
// Issues one dot product at a time with random int8 vectors, optionally adding a
// held accumulator value, and checks the 32-bit result and the STAGES-cycle latency.
module tb_dp;
  localparam int VEC = 8, ST = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                iv, ov, acc_en;
  logic [VEC-1:0][7:0] a, w;
  logic signed [31:0]  acc_in, s;

  dp #(.VEC(VEC), .STAGES(ST)) dut (.clk, .rst_n, .in_valid(iv), .act(a), .wgt(w),
                                    .acc_en, .acc_in, .out_valid(ov), .out_sum(s));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; a = '0; w = '0; acc_en = 0; acc_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      longint e;
      int lat;
      @(negedge clk);
      for (int i = 0; i < VEC; i++) begin
        a[i] = (n == 0) ? 8'h80 : 8'($urandom);
        w[i] = (n == 0) ? 8'h80 : 8'($urandom);
      end
      acc_en = n[0];
      acc_in = $signed($urandom) >>> ($urandom % 24);
      e = 0;
      for (int i = 0; i < VEC; i++) e += longint'($signed(a[i])) * longint'($signed(w[i]));
      if (acc_en) e += longint'(acc_in);
      iv = 1;
      lat = 0;
      @(negedge clk);
      iv = 0;
      lat = 1;
      while (!ov && lat < 20) begin @(negedge clk); lat++; end
      checks += 2;
      if (s != 32'(e)) begin failures++; $display("dot mismatch got %0d exp %0d", s, e); end
      if (lat != ST) begin failures++; $display("latency %0d expected %0d", lat, ST); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
