// tb_ctrl: self-checking test of the control FSM with the flash model on its
// Wishbone bus and a stand-in for the lanes (dp_out_valid follows dp_valid after a
// fixed latency). A program loaded at pc 16 exercises LDI, ADDI, a BNZ loop, WLOAD,
// DOT from input A and from input B (with and without accumulate), COPY, an unknown
// opcode and HALT. A monitor records every memory access the FSM makes and the test
// compares them with the program's intended effect. Then checks the clear sequence,
// that result reads are granted only while idle, and the DOT cycle count.
module tb_ctrl;
  import dla_pkg::*;
  localparam int LANES = 8, VEC = 8, LAT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                ib_wr_en, kick, clr, idle, done, rr_req, rr_gnt;
  logic [7:0]          ib_wr_addr, kick_pc, rr_addr;
  logic [39:0]         ib_wr_data;
  logic                ina_swap, ina_rd_en, inb_rd_en, use_b, inb_wr_en, w_rd_en;
  logic [5:0]          ina_rd_addr, inb_rd_addr, inb_wr_addr;
  logic [7:0]          inb_wr_off, w_rd_addr, w_wr_addr;
  logic [LANES-1:0]    w_wr_en;
  logic [VEC-1:0][7:0] w_wr_data;
  logic                dp_valid, dp_out_valid, acc_en, acc_rd_en, acc_wr_en, acc_wr_zero;
  sfu_fn_e             sfu_fn;
  logic [4:0]          sfu_shift;
  logic [7:0]          acc_rd_addr, acc_wr_addr;
  logic                cyc, stb, we, ack;
  logic [31:0]         adr, dat_o, dat_i;
  logic [3:0]          sel;
  int                  reads;
  logic [LAT-1:0]      dpipe;

  ctrl dut (.clk, .rst_n, .ib_wr_en, .ib_wr_addr, .ib_wr_data, .kick, .kick_pc, .clr, .idle,
            .done, .rr_req, .rr_addr, .rr_gnt, .ina_swap, .ina_rd_en, .ina_rd_addr, .inb_rd_en,
            .inb_rd_addr, .use_b, .inb_wr_en, .inb_wr_addr, .inb_wr_off, .w_rd_en, .w_rd_addr,
            .w_wr_en, .w_wr_addr, .w_wr_data, .dp_valid, .dp_out_valid, .acc_en, .sfu_fn,
            .sfu_shift, .acc_rd_en, .acc_rd_addr, .acc_wr_en, .acc_wr_zero, .acc_wr_addr,
            .wb_cyc_o(cyc), .wb_stb_o(stb), .wb_we_o(we), .wb_adr_o(adr), .wb_sel_o(sel),
            .wb_dat_o(dat_o), .wb_dat_i(dat_i), .wb_ack_i(ack));
  wb_flash_model #(.MAX_WAIT(3)) flash (.clk, .rst_n, .cyc, .stb, .we, .adr, .dat(dat_i), .ack, .reads);

  // stand-in for the lanes: fixed latency
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dpipe <= '0;
    else        dpipe <= {dpipe[LAT-2:0], dp_valid};
  end
  assign dp_out_valid = dpipe[LAT-1];

  // event log
  string log[$];
  int    n_dp_valid = 0, n_swap = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (w_wr_en != 0) log.push_back($sformatf("W lane=%b row=%0d data=%h", w_wr_en, w_wr_addr, w_wr_data));
      if (ina_rd_en)  log.push_back($sformatf("RA %0d w=%0d", ina_rd_addr, w_rd_addr));
      if (inb_rd_en)  log.push_back($sformatf("RB %0d w=%0d", inb_rd_addr, w_rd_addr));
      if (acc_rd_en && !idle)  log.push_back($sformatf("ACCR %0d", acc_rd_addr));
      if (acc_wr_en && !acc_wr_zero) log.push_back($sformatf("ACCW %0d acc=%0d fn=%0d sh=%0d b=%0d",
                                          acc_wr_addr, acc_en, sfu_fn, sfu_shift, use_b));
      if (inb_wr_en)  log.push_back($sformatf("CPY %0d off=%0d", inb_wr_addr, inb_wr_off));
      if (dp_valid) n_dp_valid++;
      if (ina_swap) n_swap++;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic string wrow(int fa, int lane, int row);
    logic [VEC-1:0][7:0] d;
    for (int b = 0; b < VEC; b++) d[b] = dla_tb_pkg::flash_byte(32'(fa + b));
    return $sformatf("W lane=%b row=%0d data=%h", LANES'(1) << lane, row, d);
  endfunction

  task automatic run(int pc, output int cycles);
    @(negedge clk); kick = 1; kick_pc = 8'(pc);
    @(negedge clk); kick = 0; cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    instr_t prog[$];
    string  exp[$];
    int     cyc_n, loop_pc;
    ib_wr_en = 0; ib_wr_addr = '0; ib_wr_data = '0; kick = 0; kick_pc = '0; clr = 0;
    rr_req = 0; rr_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    prog.push_back(mk_instr(OP_LDI,  0, 0, 3'd0, 3'd0, 27'h40));
    prog.push_back(mk_instr(OP_LDI,  0, 0, 3'd1, 3'd0, 27'd5));
    prog.push_back(mk_instr(OP_WLOAD,0, 0, 3'd0, 3'd1, 27'((2 << 12) | 3)));
    prog.push_back(mk_instr(OP_LDI,  0, 0, 3'd2, 3'd0, 27'd7));
    prog.push_back(mk_instr(OP_LDI,  0, 0, 3'd3, 3'd0, 27'd9));
    prog.push_back(mk_instr(OP_LDI,  0, 0, 3'd4, 3'd0, 27'd3));
    loop_pc = 16 + prog.size();
    prog.push_back(mk_instr(OP_DOT,  1, 0, 3'd2, 3'd3, 27'((3 << 11) | (SFU_TANH << 8) | 12)));
    prog.push_back(mk_instr(OP_ADDI, 0, 0, 3'd2, 3'd2, 27'd1));
    prog.push_back(mk_instr(OP_ADDI, 0, 0, 3'd4, 3'd4, 27'h7ffffff));
    prog.push_back(mk_instr(OP_BNZ,  0, 0, 3'd4, 3'd0, 27'(loop_pc)));
    prog.push_back(mk_instr(opcode_e'(5'd20), 1, 1, 3'd2, 3'd2, 27'h7ffffff));  // unknown: no effect
    prog.push_back(mk_instr(OP_DOT,  0, 1, 3'd2, 3'd1, 27'((1 << 11) | (SFU_RELU << 8) | 30)));
    prog.push_back(mk_instr(OP_COPY, 0, 0, 3'd2, 3'd0, 27'((3 << 8) | 20)));
    prog.push_back(mk_instr(OP_HALT, 0, 0, 3'd0, 3'd0, 27'd0));
    prog.push_back(mk_instr(OP_LDI,  0, 0, 3'd2, 3'd0, 27'd0));   // never reached
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk); ib_wr_en = 1; ib_wr_addr = 8'(16 + i); ib_wr_data = prog[i];
    end
    @(negedge clk); ib_wr_en = 0;

    exp.push_back(wrow('h40, 2, 5));
    exp.push_back(wrow('h48, 2, 6));
    exp.push_back(wrow('h50, 2, 7));
    for (int k = 0; k < 3; k++) begin
      exp.push_back($sformatf("RA %0d w=9", 7 + k));
      exp.push_back("ACCR 12");
      exp.push_back($sformatf("ACCW 12 acc=1 fn=%0d sh=3 b=0", SFU_TANH));
    end
    exp.push_back("RB 10 w=5");
    exp.push_back($sformatf("ACCW 30 acc=0 fn=%0d sh=1 b=1", SFU_RELU));
    exp.push_back("ACCR 20");
    exp.push_back("CPY 10 off=3");

    run(16, cyc_n);
    chk(log.size() == exp.size(), $sformatf("%0d events, expected %0d", log.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < log.size(); i++) begin
      chk(log[i] == exp[i], $sformatf("event %0d: got '%s' expected '%s'", i, log[i], exp[i]));
    end
    chk(n_dp_valid == 4, $sformatf("%0d lane starts, expected 4", n_dp_valid));
    chk(reads == 3 * VEC / 4, "flash reads");
    chk(n_swap == 1, "input A swapped once per kick");
    @(negedge clk);
    chk(idle, "idle after HALT");

    // result reads are granted while idle
    rr_req = 1; rr_addr = 8'd77; #1;
    chk(rr_gnt && acc_rd_en && acc_rd_addr == 77, "result read granted while idle");
    @(negedge clk); rr_req = 0;

    // cycle count of a lone DOT: kick 1 + fetch/exec/issue 3 + LAT + HALT 2
    @(negedge clk); ib_wr_en = 1; ib_wr_addr = 8'd100; ib_wr_data = mk_instr(OP_DOT, 0, 0, 3'd0, 3'd0, 27'd0);
    @(negedge clk); ib_wr_addr = 8'd101; ib_wr_data = mk_instr(OP_HALT, 0, 0, 3'd0, 3'd0, 27'd0);
    @(negedge clk); ib_wr_en = 0;
    fork
      run(100, cyc_n);
      begin
        repeat (2) @(negedge clk);
        rr_req = 1; #1;
        chk(!rr_gnt, "no result read while running");
        @(negedge clk); rr_req = 0;
      end
    join
    chk(cyc_n == 1 + 3 + LAT + 2, $sformatf("DOT program took %0d cycles", cyc_n));

    // clear: every address written with zero, one per cycle
    begin
      int n = 0;
      bit inorder = 1;
      @(negedge clk); clr = 1;
      @(negedge clk); clr = 0;
      while (!idle) begin
        if (!(acc_wr_en && acc_wr_zero && acc_wr_addr == 8'(n))) inorder = 0;
        n++;
        @(negedge clk);
      end
      chk(n == 256 && inorder, $sformatf("clear wrote %0d entries", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
