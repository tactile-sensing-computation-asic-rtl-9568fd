// regfile: register file embedded in the control path.
//
// NREGS registers of W bits, addressed by the instructions' two 3-bit register-id
// fields. Two combinational read ports (one per reg-id field) and one write port
// that takes effect at the clock edge. All registers reset to zero (asynchronous,
// active low). The register count follows from the 3-bit id fields; width and reset
// value are this design's choices.
module regfile #(
  parameter int NREGS = 8,
  parameter int W     = 32,
  localparam int AW   = $clog2(NREGS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [W-1:0]  wr_data,
  input  logic [AW-1:0] rd_addr0,
  output logic [W-1:0]  rd_data0,
  input  logic [AW-1:0] rd_addr1,
  output logic [W-1:0]  rd_data1
);

  logic [W-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (wr_en) begin
      regs[wr_addr] <= wr_data;
    end
  end

  assign rd_data0 = regs[rd_addr0];
  assign rd_data1 = regs[rd_addr1];

endmodule
