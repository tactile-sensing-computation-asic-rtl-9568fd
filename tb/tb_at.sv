// tb_at: self-checking test of the pipelined adder tree.
// Two instances: the default 8-input, 2-stage tree, and a 5-input tree with no
// pipeline register (padding and the combinational path). Random vectors are fed
// every cycle; each sum is checked against a reference sum computed here, and the
// latency against STAGES.
module tb_at;
  localparam int N = 8, W = 16, ST = 2;
  localparam int N2 = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0][W-1:0]  d;
  logic                 iv, ov;
  logic signed [W+2:0]  s;
  logic [N2-1:0][W-1:0] d2;
  logic                 ov2;
  logic signed [W+2:0]  s2;

  at #(.N(N),  .W(W), .STAGES(ST)) dut  (.clk, .rst_n, .in_valid(iv), .in_data(d),  .out_valid(ov),  .out_sum(s));
  at #(.N(N2), .W(W), .STAGES(0))  dut2 (.clk, .rst_n, .in_valid(iv), .in_data(d2), .out_valid(ov2), .out_sum(s2));

  longint exp_q[$];
  int     t_in[$];
  int     cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    iv = 0; d = '0; d2 = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 400; n++) begin
      longint e, e2;
      iv = ($urandom % 4) != 0;
      e = 0; e2 = 0;
      for (int i = 0; i < N; i++) begin
        d[i] = (n < 4) ? ((n % 2) ? 16'h8000 : 16'h7fff) : 16'($urandom);
        e += longint'($signed(d[i]));
      end
      for (int i = 0; i < N2; i++) begin
        d2[i] = 16'($urandom);
        e2 += longint'($signed(d2[i]));
      end
      // combinational instance: check right away
      #1;
      checks++;
      if (ov2 !== iv || (iv && longint'(s2) != e2)) begin
        failures++;
        $display("comb tree mismatch: got %0d exp %0d", s2, e2);
      end
      if (iv) begin exp_q.push_back(e); t_in.push_back(cyc); end
      @(negedge clk);
    end
    iv = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d sums never came out", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && ov) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("unexpected out_valid");
      end else begin
        longint e;
        int t;
        e = exp_q.pop_front();
        t = t_in.pop_front();
        if (longint'(s) != e) begin failures++; $display("sum mismatch got %0d exp %0d", s, e); end
        if (cyc - t != ST) begin failures++; $display("latency %0d, expected %0d", cyc - t, ST); end
      end
    end
  end
endmodule
