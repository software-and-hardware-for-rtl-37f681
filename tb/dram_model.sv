// dram_model: behavioural stand-in for the DDR2 memory and its controller,
// used by testbenches only. A word port: a request held high is answered
// with dram_ack after WAIT cycles (read data comes with the ack). The memory
// holds WORDS 32-bit words at byte addresses BASE .. BASE+4*WORDS-1 and starts
// at zero; an address outside wraps.
module dram_model #(
  parameter int unsigned WORDS = 256,
  parameter logic [31:0] BASE  = 32'h9000_0000,
  parameter int unsigned WAIT  = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  logic        we,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        ack,
  output logic [31:0] rdata
);
  logic [31:0] mem [WORDS];
  int unsigned cnt;
  int unsigned idx;
  assign idx = ((addr - BASE) >> 2) % WORDS;

  initial for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;

  always @(posedge clk) begin
    if (rst) begin
      ack <= 1'b0; cnt <= 0; rdata <= '0;
    end else begin
      ack <= 1'b0;
      if (req && !ack) begin
        if (cnt == WAIT) begin
          cnt <= 0;
          ack <= 1'b1;
          if (we) mem[idx] <= wdata;
          rdata <= mem[idx];
        end else cnt <= cnt + 1;
      end
    end
  end
endmodule
