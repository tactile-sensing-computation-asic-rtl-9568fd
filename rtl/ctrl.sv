// ctrl: control path of the DLA, written as one finite state machine.
//
// Holds the instruction buffer, the register file and the Wishbone master. After a
// kick it fetches 40-bit instructions from the buffer, starting at the kick's pc,
// and executes them one at a time until HALT, then pulses `done`. The instruction
// format is the chip's; the instruction set (dla_pkg) is this design's own:
//   LDI/ADDI/BNZ  set registers and loop, so one short program walks a matrix.
//   WLOAD         streams `rows` weight rows from flash byte address r[rid0] into the
//                 weight memory of one lane, starting at row r[rid1]. Each row is
//                 VEC/4 Wishbone words, least significant byte first.
//   DOT           reads input word r[rid0] (memory A, or B with mode-1), weight row
//                 r[rid1] in every lane and, with mode-0, the accumulator entry; one
//                 cycle later the lanes start; when they finish (adder tree latency)
//                 the SFU outputs are written to the accumulation entry.
//   COPY          reads one accumulation entry from every lane and writes lane l's
//                 low byte to byte (offset + l) of input memory B word r[rid0]; this
//                 feeds a recurrent state back as an input.
// While idle it also serves result reads (rr_*) and a clear of the accumulation
// memories (one address per cycle). Instructions execute in order with no overlap:
// fetch 1 cycle, simple ops 1 cycle, DOT 2 + STAGES cycles, COPY 2 cycles, WLOAD
// per row VEC/4 Wishbone reads plus one write cycle. Unknown opcodes act as NOP.
// Reset is asynchronous, active low.
module ctrl
  import dla_pkg::*;
#(
  parameter int LANES     = 8,
  parameter int VEC       = 8,
  parameter int IB_DEPTH  = 256,
  parameter int INA_DEPTH = 64,
  parameter int INB_DEPTH = 64,
  parameter int W_DEPTH   = 256,
  parameter int ACC_DEPTH = 256,
  localparam int PCW  = $clog2(IB_DEPTH),
  localparam int IAW  = $clog2(INA_DEPTH),
  localparam int IBW  = $clog2(INB_DEPTH),
  localparam int WAW  = $clog2(W_DEPTH),
  localparam int CAW  = $clog2(ACC_DEPTH),
  localparam int LW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // program load
  input  logic                 ib_wr_en,
  input  logic [PCW-1:0]       ib_wr_addr,
  input  logic [INSTR_W-1:0]   ib_wr_data,
  // commands (accepted only while idle)
  input  logic                 kick,
  input  logic [PCW-1:0]       kick_pc,
  input  logic                 clr,
  output logic                 idle,
  output logic                 done,
  // result read
  input  logic                 rr_req,
  input  logic [CAW-1:0]       rr_addr,
  output logic                 rr_gnt,
  // input memories
  output logic                 ina_swap,
  output logic                 ina_rd_en,
  output logic [IAW-1:0]       ina_rd_addr,
  output logic                 inb_rd_en,
  output logic [IBW-1:0]       inb_rd_addr,
  output logic                 use_b,
  output logic                 inb_wr_en,
  output logic [IBW-1:0]       inb_wr_addr,
  output logic [7:0]           inb_wr_off,
  // weight memories
  output logic                 w_rd_en,
  output logic [WAW-1:0]       w_rd_addr,
  output logic [LANES-1:0]     w_wr_en,
  output logic [WAW-1:0]       w_wr_addr,
  output logic [VEC-1:0][7:0]  w_wr_data,
  // dot product lanes and SFUs
  output logic                 dp_valid,
  input  logic                 dp_out_valid,
  output logic                 acc_en,
  output sfu_fn_e              sfu_fn,
  output logic [4:0]           sfu_shift,
  // accumulation memories
  output logic                 acc_rd_en,
  output logic [CAW-1:0]       acc_rd_addr,
  output logic                 acc_wr_en,
  output logic                 acc_wr_zero,
  output logic [CAW-1:0]       acc_wr_addr,
  // Wishbone to the flash
  output logic                 wb_cyc_o,
  output logic                 wb_stb_o,
  output logic                 wb_we_o,
  output logic [31:0]          wb_adr_o,
  output logic [3:0]           wb_sel_o,
  output logic [31:0]          wb_dat_o,
  input  logic [31:0]          wb_dat_i,
  input  logic                 wb_ack_i
);

  localparam int WPR = VEC / 4;   // Wishbone words per weight row
  localparam int WCW = (WPR > 1) ? $clog2(WPR) : 1;

  typedef enum logic [3:0] {
    S_IDLE, S_CLEAR, S_FETCH, S_EXEC, S_WB_REQ, S_WB_WAIT, S_W_WRITE,
    S_DOT, S_COPY
  } state_e;

  state_e           state;
  logic [PCW-1:0]   pc;
  instr_t           ins;
  logic [INSTR_W-1:0] ib_rd_data;

  // register file
  logic             rf_we;
  logic [2:0]       rf_waddr;
  logic [REG_W-1:0] rf_wdata, r0, r1;

  // WLOAD state
  logic [31:0]      fl_addr;
  logic [WAW-1:0]   w_row;
  logic [11:0]      rows_left;
  logic [LW-1:0]    w_lane;
  logic [WCW-1:0]   word_cnt;
  logic [VEC-1:0][7:0] row_buf;

  // DOT / COPY / CLEAR state
  logic             dot_issued;
  logic [CAW-1:0]   op_acc_addr;
  logic [IBW-1:0]   copy_addr;
  logic [7:0]       copy_off;
  logic [CAW-1:0]   clr_addr;

  // Wishbone master
  logic             wbm_req_valid, wbm_req_ready, wbm_rsp_valid;
  logic [31:0]      wbm_rsp_data;

  initial begin
    assert (VEC % 4 == 0) else $error("ctrl: VEC must be a multiple of 4");
  end

  instr_buf #(.DEPTH(IB_DEPTH), .W(INSTR_W)) u_ibuf (
    .clk    (clk),
    .wr_en  (ib_wr_en),
    .wr_addr(ib_wr_addr),
    .wr_data(ib_wr_data),
    .rd_en  (state == S_FETCH),
    .rd_addr(pc),
    .rd_data(ib_rd_data)
  );
  assign ins = instr_t'(ib_rd_data);

  regfile #(.NREGS(NREGS), .W(REG_W)) u_rf (
    .clk     (clk),
    .rst_n   (rst_n),
    .wr_en   (rf_we),
    .wr_addr (rf_waddr),
    .wr_data (rf_wdata),
    .rd_addr0(ins.rid0),
    .rd_data0(r0),
    .rd_addr1(ins.rid1),
    .rd_data1(r1)
  );

  wb_master #(.AW(32), .DW(32)) u_wbm (
    .clk      (clk),
    .rst_n    (rst_n),
    .req_valid(wbm_req_valid),
    .req_ready(wbm_req_ready),
    .req_addr (fl_addr),
    .rsp_valid(wbm_rsp_valid),
    .rsp_data (wbm_rsp_data),
    .wb_cyc_o (wb_cyc_o),
    .wb_stb_o (wb_stb_o),
    .wb_we_o  (wb_we_o),
    .wb_adr_o (wb_adr_o),
    .wb_sel_o (wb_sel_o),
    .wb_dat_o (wb_dat_o),
    .wb_dat_i (wb_dat_i),
    .wb_ack_i (wb_ack_i)
  );

  // ---------------- combinational outputs ----------------
  assign idle     = (state == S_IDLE);
  assign rr_gnt   = idle && rr_req && !kick && !clr;
  assign ina_swap = idle && kick;

  always_comb begin
    rf_we    = 1'b0;
    rf_waddr = ins.rid0;
    rf_wdata = '0;
    if (state == S_EXEC) begin
      unique case (ins.opcode)
        OP_LDI:  begin rf_we = 1'b1; rf_wdata = REG_W'(ins.payload); end
        OP_ADDI: begin rf_we = 1'b1; rf_wdata = r1 + REG_W'(signed'(ins.payload)); end
        default: ;
      endcase
    end
  end

  wire exec_dot  = (state == S_EXEC) && (ins.opcode == OP_DOT);
  wire exec_copy = (state == S_EXEC) && (ins.opcode == OP_COPY);

  assign ina_rd_en   = exec_dot && !ins.mode1;
  assign ina_rd_addr = IAW'(r0);
  assign inb_rd_en   = exec_dot && ins.mode1;
  assign inb_rd_addr = IBW'(r0);
  assign w_rd_en     = exec_dot;
  assign w_rd_addr   = WAW'(r1);

  always_comb begin
    acc_rd_en   = 1'b0;
    acc_rd_addr = CAW'(ins.payload[7:0]);
    if ((exec_dot && ins.mode0) || exec_copy) begin
      acc_rd_en = 1'b1;
    end else if (rr_gnt) begin
      acc_rd_en   = 1'b1;
      acc_rd_addr = rr_addr;
    end
  end

  assign dp_valid    = (state == S_DOT) && !dot_issued;
  assign acc_wr_en   = ((state == S_DOT) && dp_out_valid) || (state == S_CLEAR);
  assign acc_wr_zero = (state == S_CLEAR);
  assign acc_wr_addr = (state == S_CLEAR) ? clr_addr : op_acc_addr;

  assign inb_wr_en   = (state == S_COPY);
  assign inb_wr_addr = copy_addr;
  assign inb_wr_off  = copy_off;

  assign wbm_req_valid = (state == S_WB_REQ);
  assign w_wr_addr     = w_row;
  assign w_wr_data     = row_buf;
  always_comb begin
    w_wr_en = '0;
    if (state == S_W_WRITE) w_wr_en[w_lane] = 1'b1;
  end

  // ---------------- state machine ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pc          <= '0;
      done        <= 1'b0;
      fl_addr     <= '0;
      w_row       <= '0;
      rows_left   <= '0;
      w_lane      <= '0;
      word_cnt    <= '0;
      row_buf     <= '0;
      dot_issued  <= 1'b0;
      op_acc_addr <= '0;
      copy_addr   <= '0;
      copy_off    <= '0;
      clr_addr    <= '0;
      use_b       <= 1'b0;
      acc_en      <= 1'b0;
      sfu_fn      <= SFU_PASS;
      sfu_shift   <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (kick) begin
            pc    <= kick_pc;
            state <= S_FETCH;
          end else if (clr) begin
            clr_addr <= '0;
            state    <= S_CLEAR;
          end
        end

        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == CAW'(ACC_DEPTH - 1)) state <= S_IDLE;
        end

        S_FETCH: state <= S_EXEC;

        S_EXEC: begin
          state <= S_FETCH;
          pc    <= pc + 1'b1;
          unique case (ins.opcode)
            OP_HALT: begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
            OP_BNZ: begin
              if (r0 != '0) pc <= PCW'(ins.payload);
            end
            OP_WLOAD: begin
              fl_addr   <= r0;
              w_row     <= WAW'(r1);
              rows_left <= ins.payload[11:0];
              w_lane    <= LW'(ins.payload[15:12]);
              word_cnt  <= '0;
              if (ins.payload[11:0] != '0) begin
                state <= S_WB_REQ;
                pc    <= pc;
              end
            end
            OP_DOT: begin
              use_b       <= ins.mode1;
              acc_en      <= ins.mode0;
              sfu_fn      <= sfu_fn_e'(ins.payload[10:8]);
              sfu_shift   <= ins.payload[15:11];
              op_acc_addr <= CAW'(ins.payload[7:0]);
              dot_issued  <= 1'b0;
              state       <= S_DOT;
              pc          <= pc;
            end
            OP_COPY: begin
              copy_addr <= IBW'(r0);
              copy_off  <= ins.payload[15:8];
              state     <= S_COPY;
              pc        <= pc;
            end
            default: ;
          endcase
        end

        S_WB_REQ: begin
          if (wbm_req_ready) state <= S_WB_WAIT;
        end

        S_WB_WAIT: begin
          if (wbm_rsp_valid) begin
            for (int b = 0; b < 4; b++) row_buf[4*word_cnt + b] <= wbm_rsp_data[8*b +: 8];
            fl_addr <= fl_addr + 32'd4;
            if (word_cnt == WCW'(WPR - 1)) begin
              word_cnt <= '0;
              state    <= S_W_WRITE;
            end else begin
              word_cnt <= word_cnt + 1'b1;
              state    <= S_WB_REQ;
            end
          end
        end

        S_W_WRITE: begin
          w_row     <= w_row + 1'b1;
          rows_left <= rows_left - 1'b1;
          if (rows_left == 12'd1) begin
            pc    <= pc + 1'b1;
            state <= S_FETCH;
          end else begin
            state <= S_WB_REQ;
          end
        end

        S_DOT: begin
          dot_issued <= 1'b1;
          if (dp_out_valid) begin
            pc    <= pc + 1'b1;
            state <= S_FETCH;
          end
        end

        S_COPY: begin
          pc    <= pc + 1'b1;
          state <= S_FETCH;
        end

        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
