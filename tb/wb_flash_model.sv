// wb_flash_model: behavioural model of the weight flash seen through a Wishbone
// slave (a QSPI flash controller and the flash chip). Read-only: a classic read
// cycle is acknowledged after a random wait of 0..MAX_WAIT cycles, with the four
// bytes at the word-aligned byte address, least significant byte first. The
// content is a fixed function of the byte address, dla_tb_pkg::flash_byte(), which
// testbenches call to build their expected values. Not synthesizable in intent; for testbenches.
module wb_flash_model #(
  parameter int MAX_WAIT = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cyc,
  input  logic        stb,
  input  logic        we,
  input  logic [31:0] adr,
  output logic [31:0] dat,
  output logic        ack,
  output int          reads
);
  int wait_cnt;

  function automatic logic [7:0] flash_byte(logic [31:0] a);
    return dla_tb_pkg::flash_byte(a);
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack <= 1'b0; dat <= '0; wait_cnt <= 0; reads <= 0;
    end else begin
      ack <= 1'b0;
      if (cyc && stb && !we && !ack) begin
        if (wait_cnt == 0) begin
          for (int b = 0; b < 4; b++) dat[8*b +: 8] <= flash_byte({adr[31:2], 2'b00} + 32'(b));
          ack      <= 1'b1;
          reads    <= reads + 1;
          wait_cnt <= int'($urandom % (MAX_WAIT + 1));
        end else begin
          wait_cnt <= wait_cnt - 1;
        end
      end
    end
  end
endmodule
