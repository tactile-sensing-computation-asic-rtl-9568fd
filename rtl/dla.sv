// dla: the deep learning accelerator core.
//
// Wires the control path (ctrl) to the datapath: input memory A (ping-pong, filled
// with sensor bytes from the ring), input memory B (filled from the accumulation
// memories, e.g. a recurrent hidden state), and LANES parallel lanes, each with its
// own weight memory, dot product unit (dp, with its adder tree), SFU and
// accumulation memory. In a DOT step every lane reads the same input word and its
// own weight row, so the LANES lanes compute LANES output neurons at once, VEC
// multiply-accumulates each. The SFU output is written to the lane's accumulation
// memory in the cycle the lane's sum appears. Results are int8 values in the
// accumulation memories, read out one entry at a time through rr_*. This structure
// follows the chip's description; the number of lanes and all sizes are this
// design's choices.
//
// Interface: program words (ib_*), input memory A writes (ina_*: word address, byte
// mask, VEC bytes), kick/clr commands taken while `idle`, `done` pulsed when the
// program halts, result reads (rr_req/rr_gnt, then rr_valid/rr_data a cycle after
// the grant), and the Wishbone bus to the weight flash.
module dla
  import dla_pkg::*;
#(
  parameter int LANES     = 8,
  parameter int VEC       = 8,
  parameter int STAGES    = 2,
  parameter int IB_DEPTH  = 256,
  parameter int INA_DEPTH = 64,
  parameter int INB_DEPTH = 64,
  parameter int W_DEPTH   = 256,
  parameter int ACC_DEPTH = 256,
  localparam int PCW = $clog2(IB_DEPTH),
  localparam int IAW = $clog2(INA_DEPTH),
  localparam int CAW = $clog2(ACC_DEPTH),
  localparam int LW  = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ib_wr_en,
  input  logic [PCW-1:0]      ib_wr_addr,
  input  logic [INSTR_W-1:0]  ib_wr_data,
  input  logic                ina_wr_en,
  input  logic [IAW-1:0]      ina_wr_addr,
  input  logic [VEC-1:0]      ina_wr_be,
  input  logic [VEC-1:0][7:0] ina_wr_data,
  input  logic                kick,
  input  logic [PCW-1:0]      kick_pc,
  input  logic                clr,
  output logic                idle,
  output logic                done,
  input  logic                rr_req,
  input  logic [LW-1:0]       rr_lane,
  input  logic [CAW-1:0]      rr_addr,
  output logic                rr_gnt,
  output logic                rr_valid,
  output logic [ACC_W-1:0]    rr_data,
  output logic                wb_cyc_o,
  output logic                wb_stb_o,
  output logic                wb_we_o,
  output logic [31:0]         wb_adr_o,
  output logic [3:0]          wb_sel_o,
  output logic [31:0]         wb_dat_o,
  input  logic [31:0]         wb_dat_i,
  input  logic                wb_ack_i
);

  localparam int IBW = $clog2(INB_DEPTH);
  localparam int WAW = $clog2(W_DEPTH);

  logic                ina_swap, ina_rd_en, inb_rd_en, use_b, inb_wr_en;
  logic [IAW-1:0]      ina_rd_addr;
  logic [IBW-1:0]      inb_rd_addr, inb_wr_addr;
  logic [7:0]          inb_wr_off;
  logic                w_rd_en;
  logic [WAW-1:0]      w_rd_addr, w_wr_addr;
  logic [LANES-1:0]    w_wr_en;
  logic [VEC-1:0][7:0] w_wr_data;
  logic                dp_valid, acc_en;
  sfu_fn_e             sfu_fn;
  logic [4:0]          sfu_shift;
  logic                acc_rd_en, acc_wr_en, acc_wr_zero;
  logic [CAW-1:0]      acc_rd_addr, acc_wr_addr;

  logic [VEC-1:0][7:0] ina_rd_data, inb_rd_data, act;
  logic [VEC-1:0]      inb_wr_be;
  logic [VEC-1:0][7:0] inb_wr_data;
  logic                ina_bank, inb_bank;   // bank indicators, not needed by the core

  logic [LANES-1:0]             lane_out_valid;
  logic [ACC_W-1:0]             acc_rd_data [LANES];
  logic [LW-1:0]                rr_lane_q;

  ctrl #(
    .LANES(LANES), .VEC(VEC), .IB_DEPTH(IB_DEPTH), .INA_DEPTH(INA_DEPTH),
    .INB_DEPTH(INB_DEPTH), .W_DEPTH(W_DEPTH), .ACC_DEPTH(ACC_DEPTH)
  ) u_ctrl (
    .clk, .rst_n,
    .ib_wr_en, .ib_wr_addr, .ib_wr_data,
    .kick, .kick_pc, .clr, .idle, .done,
    .rr_req, .rr_addr, .rr_gnt,
    .ina_swap, .ina_rd_en, .ina_rd_addr, .inb_rd_en, .inb_rd_addr, .use_b,
    .inb_wr_en, .inb_wr_addr, .inb_wr_off,
    .w_rd_en, .w_rd_addr, .w_wr_en, .w_wr_addr, .w_wr_data,
    .dp_valid, .dp_out_valid(lane_out_valid[0]), .acc_en, .sfu_fn, .sfu_shift,
    .acc_rd_en, .acc_rd_addr, .acc_wr_en, .acc_wr_zero, .acc_wr_addr,
    .wb_cyc_o, .wb_stb_o, .wb_we_o, .wb_adr_o, .wb_sel_o, .wb_dat_o, .wb_dat_i, .wb_ack_i
  );

  in_mem #(.VEC(VEC), .DEPTH(INA_DEPTH), .BANKS(2)) u_ina (
    .clk, .rst_n,
    .swap   (ina_swap),
    .wr_en  (ina_wr_en),
    .wr_addr(ina_wr_addr),
    .wr_be  (ina_wr_be),
    .wr_data(ina_wr_data),
    .rd_en  (ina_rd_en),
    .rd_addr(ina_rd_addr),
    .rd_data(ina_rd_data),
    .rd_bank(ina_bank)
  );

  in_mem #(.VEC(VEC), .DEPTH(INB_DEPTH), .BANKS(1)) u_inb (
    .clk, .rst_n,
    .swap   (1'b0),
    .wr_en  (inb_wr_en),
    .wr_addr(inb_wr_addr),
    .wr_be  (inb_wr_be),
    .wr_data(inb_wr_data),
    .rd_en  (inb_rd_en),
    .rd_addr(inb_rd_addr),
    .rd_data(inb_rd_data),
    .rd_bank(inb_bank)
  );

  assign act = use_b ? inb_rd_data : ina_rd_data;

  // COPY: byte (offset + l) of the input-B word takes lane l's low byte.
  always_comb begin
    inb_wr_be   = '0;
    inb_wr_data = '0;
    for (int l = 0; l < LANES; l++) begin
      if (int'(inb_wr_off) + l < VEC) begin
        inb_wr_be[int'(inb_wr_off) + l]   = 1'b1;
        inb_wr_data[int'(inb_wr_off) + l] = acc_rd_data[l][7:0];
      end
    end
  end

  for (genvar l = 0; l < LANES; l++) begin : g_lane
    logic [VEC-1:0][7:0]     w_rd_data;
    logic signed [ACC_W-1:0] lane_sum, sfu_out;

    wmem #(.VEC(VEC), .DEPTH(W_DEPTH)) u_wmem (
      .clk,
      .wr_en  (w_wr_en[l]),
      .wr_addr(w_wr_addr),
      .wr_data(w_wr_data),
      .rd_en  (w_rd_en),
      .rd_addr(w_rd_addr),
      .rd_data(w_rd_data)
    );

    dp #(.VEC(VEC), .STAGES(STAGES), .ACC_W(ACC_W)) u_dp (
      .clk, .rst_n,
      .in_valid (dp_valid),
      .act      (act),
      .wgt      (w_rd_data),
      .acc_en   (acc_en),
      .acc_in   (acc_rd_data[l]),
      .out_valid(lane_out_valid[l]),
      .out_sum  (lane_sum)
    );

    sfu u_sfu (
      .x    (lane_sum),
      .fn   (sfu_fn),
      .shift(sfu_shift),
      .y    (sfu_out)
    );

    acc_mem #(.W(ACC_W), .DEPTH(ACC_DEPTH)) u_acc (
      .clk,
      .wr_en  (acc_wr_en),
      .wr_addr(acc_wr_addr),
      .wr_data(acc_wr_zero ? '0 : sfu_out),
      .rd_en  (acc_rd_en),
      .rd_addr(acc_rd_addr),
      .rd_data(acc_rd_data[l])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr_valid  <= 1'b0;
      rr_lane_q <= '0;
    end else begin
      rr_valid  <= rr_gnt;
      if (rr_gnt) rr_lane_q <= rr_lane;
    end
  end
  assign rr_data = acc_rd_data[rr_lane_q];

  // All lanes are started together and have the same latency; the control path
  // watches lane 0 only.
  a_lanes_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                    lane_out_valid == '0 || lane_out_valid == '1);

endmodule
