// tb_wb_master: self-checking test of the Wishbone master against the flash model.
// Random read requests; checks returned data, that each request causes exactly one
// Wishbone cycle, and that the response follows the ack by one cycle.
module tb_wb_master;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        req_valid, req_ready, rsp_valid;
  logic [31:0] req_addr, rsp_data;
  logic        cyc, stb, we, ack;
  logic [31:0] adr, dat_o, dat_i;
  logic [3:0]  sel;
  int          reads;

  wb_master dut (.clk, .rst_n, .req_valid, .req_ready, .req_addr, .rsp_valid, .rsp_data,
                 .wb_cyc_o(cyc), .wb_stb_o(stb), .wb_we_o(we), .wb_adr_o(adr), .wb_sel_o(sel),
                 .wb_dat_o(dat_o), .wb_dat_i(dat_i), .wb_ack_i(ack));
  wb_flash_model #(.MAX_WAIT(4)) flash (.clk, .rst_n, .cyc, .stb, .we, .adr, .dat(dat_i), .ack, .reads);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 0; req_addr = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [31:0] a, e;
      bit acked;
      a = {$urandom % 32'h10000, 2'b00};
      for (int b = 0; b < 4; b++) e[8*b +: 8] = flash.flash_byte(a + 32'(b));
      @(negedge clk);
      checks++;
      if (!req_ready) begin failures++; $display("master not ready when idle"); end
      req_valid = 1; req_addr = a;
      @(negedge clk);
      req_valid = 0;
      checks += 3;
      if (!(cyc && stb && !we && sel == 4'hf && adr == a)) begin failures++; $display("bad bus cycle"); end
      acked = 0;
      while (!rsp_valid) begin
        if (ack) acked = 1;
        @(negedge clk);
      end
      if (!acked) begin failures++; $display("response without ack"); end
      if (rsp_data != e) begin failures++; $display("data %h exp %h", rsp_data, e); end
      @(negedge clk);
      checks++;
      if (cyc) begin failures++; $display("cycle still open"); end
    end
    checks++;
    if (reads != 200) begin failures++; $display("%0d bus reads for 200 requests", reads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
