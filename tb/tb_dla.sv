// tb_dla: self-checking test of the DLA core at its default sizes.
// Loads the test program of dla_tb_pkg, writes an input frame into input memory A,
// kicks the program and waits for done, then reads every lane's two results and
// compares them with the reference model. A second frame is written into the other
// ping-pong bank while the first is being processed and run next. Finally the
// result buffer is cleared and read back as zeros. Also checks the cycle count of a
// single DOT against fetch + issue + adder-tree latency.
module tb_dla;
  import dla_pkg::*;
  import dla_tb_pkg::*;
  localparam int LANES = 8, VEC = 8, STAGES = 2, P = 6;
  localparam int FN = 1, SH = 9, SH2 = 6;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                ib_wr_en, ina_wr_en, kick, clr, idle, done;
  logic [7:0]          ib_wr_addr, kick_pc;
  logic [39:0]         ib_wr_data;
  logic [5:0]          ina_wr_addr;
  logic [VEC-1:0]      ina_wr_be;
  logic [VEC-1:0][7:0] ina_wr_data;
  logic                rr_req, rr_gnt, rr_valid;
  logic [2:0]          rr_lane;
  logic [7:0]          rr_addr;
  logic [31:0]         rr_data;
  logic                cyc, stb, we, ack;
  logic [31:0]         adr, dat_o, dat_i;
  logic [3:0]          sel;
  int                  reads;

  dla dut (.clk, .rst_n, .ib_wr_en, .ib_wr_addr, .ib_wr_data, .ina_wr_en, .ina_wr_addr,
           .ina_wr_be, .ina_wr_data, .kick, .kick_pc, .clr, .idle, .done, .rr_req, .rr_lane,
           .rr_addr, .rr_gnt, .rr_valid, .rr_data, .wb_cyc_o(cyc), .wb_stb_o(stb), .wb_we_o(we),
           .wb_adr_o(adr), .wb_sel_o(sel), .wb_dat_o(dat_o), .wb_dat_i(dat_i), .wb_ack_i(ack));
  wb_flash_model #(.MAX_WAIT(2)) flash (.clk, .rst_n, .cyc, .stb, .we, .adr, .dat(dat_i), .ack, .reads);

  instr_t       prog[$];
  logic [7:0]   frame[$];
  longint       r0[$], r1[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_frame(int seed);
    frame.delete();
    for (int k = 0; k < P * VEC; k++) frame.push_back(8'($urandom));
    for (int w = 0; w < P; w++) begin
      @(negedge clk);
      ina_wr_en = 1; ina_wr_addr = 6'(w); ina_wr_be = '1;
      for (int b = 0; b < VEC; b++) ina_wr_data[b] = frame[w * VEC + b];
    end
    @(negedge clk);
    ina_wr_en = 0;
  endtask

  task automatic read_result(int lane, int addr, output logic [31:0] v);
    @(negedge clk);
    rr_req = 1; rr_lane = 3'(lane); rr_addr = 8'(addr);
    while (!rr_gnt) @(negedge clk);
    @(negedge clk);
    rr_req = 0;
    if (!rr_valid) begin failures++; $display("rr_valid missing"); end
    v = rr_data;
  endtask

  task automatic check_results();
    logic [31:0] v;
    for (int l = 0; l < LANES; l++) begin
      read_result(l, 0, v);
      checks++;
      if (longint'($signed(v)) != r0[l]) begin failures++; $display("lane %0d out: got %0d exp %0d", l, $signed(v), r0[l]); end
      read_result(l, 1, v);
      checks++;
      if (longint'($signed(v)) != r1[l]) begin failures++; $display("lane %0d step: got %0d exp %0d", l, $signed(v), r1[l]); end
    end
  endtask

  task automatic kick_and_wait(int pc, output int cycles);
    @(negedge clk);
    kick = 1; kick_pc = 8'(pc);
    @(negedge clk);
    kick = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    logic [7:0] frame1[$];
    int cyc_n;
    logic [31:0] v;
    ib_wr_en = 0; ina_wr_en = 0; kick = 0; clr = 0; rr_req = 0;
    ib_wr_addr = '0; ib_wr_data = '0; kick_pc = '0; ina_wr_addr = '0; ina_wr_be = '0;
    ina_wr_data = '0; rr_lane = '0; rr_addr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    build_program(LANES, VEC, P, FN, SH, SH2, prog);
    for (int i = 0; i < prog.size(); i++) begin
      @(negedge clk);
      ib_wr_en = 1; ib_wr_addr = 8'(i); ib_wr_data = prog[i];
    end
    // a one-DOT program after the main one, for the timing check
    @(negedge clk);
    ib_wr_addr = 8'(200); ib_wr_data = mk_instr(OP_DOT, 0, 0, 3'd2, 3'd3, 27'd9);
    @(negedge clk);
    ib_wr_addr = 8'(201); ib_wr_data = mk_instr(OP_HALT, 0, 0, 3'd0, 3'd0, 27'd0);
    @(negedge clk);
    ib_wr_en = 0;

    // frame 1
    write_frame(1);
    frame1 = frame;
    expected(LANES, VEC, P, FN, SH, SH2, frame1, r0, r1);
    @(negedge clk);
    kick = 1; kick_pc = 0;
    @(negedge clk);
    kick = 0;
    // frame 2 goes into the other bank while frame 1 is processed
    write_frame(2);
    checks++;
    if (idle) begin failures++; $display("frame 2 was not written during the run"); end
    while (!done) @(negedge clk);
    checks++;
    if (reads != LANES * (P + 1) * VEC / 4) begin failures++; $display("%0d flash reads", reads); end
    check_results();

    // frame 2 (weights stay loaded; program rerun from the start reloads them)
    expected(LANES, VEC, P, FN, SH, SH2, frame, r0, r1);
    kick_and_wait(0, cyc_n);
    check_results();

    // timing: kick accepted (1), DOT: fetch + execute + issue + STAGES (3 + STAGES),
    // HALT: fetch + execute (2)
    kick_and_wait(200, cyc_n);
    checks++;
    if (cyc_n != 1 + 3 + STAGES + 2) begin failures++; $display("DOT program took %0d cycles", cyc_n); end

    // clear the result buffer
    @(negedge clk);
    clr = 1;
    @(negedge clk);
    clr = 0;
    while (!idle) @(negedge clk);
    for (int l = 0; l < LANES; l++) begin
      read_result(l, 0, v);
      checks++;
      if (v != 0) begin failures++; $display("lane %0d not cleared", l); end
      read_result(l, 255, v);
      checks++;
      if (v != 0) begin failures++; $display("lane %0d entry 255 not cleared", l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
