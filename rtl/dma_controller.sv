// dma_controller: block copy between the DRAM (main memory and the tasks'
// backup storage, BS) and the SPM, started by the operating system.
//
// It follows the DMA chart of the paper: on start, a transfer towards the
// SPM is done only if the SPM is not full (spm_not_full); a transfer towards
// the SPM while the SPM is full, and any transfer not towards the SPM, copies
// SPM words out to the backup storage instead. Before touching the buses the
// controller raises dreq and waits for the processor's dgrant (the processor
// then leaves the address and data buses to it). When the last word is
// copied it drops dreq, releasing the buses, and in that same cycle pulses
// done towards the OS;
// to_bs tells which way the copy went.
// Interfaces: SPM side is a BRAM port (port A of the SPM: byte address,
// enable, byte write enables, read data one cycle after the address). DRAM
// side is a word port with a request held until dram_ack; read data comes
// with dram_ack. Each word costs two SPM/DRAM steps, so a copy of N words
// takes about 2N cycles plus the DRAM wait states.
// The decision chart, the bus request/grant and the release signal are the
// paper's; the port shapes, the word count input and the timing are this
// design's choice (the paper uses the Xilinx PLB central DMA here).
module dma_controller (
  input  logic        clk,
  input  logic        rst,
  // command from the operating system
  input  logic        start,
  input  logic        to_spm,
  input  logic        spm_not_full,
  input  logic [31:0] spm_addr,
  input  logic [31:0] dram_addr,
  input  logic [15:0] len_words,
  output logic        busy,
  output logic        done,
  output logic        to_bs,
  // bus request / grant with the processor
  output logic        dreq,
  input  logic        dgrant,
  // SPM (BRAM port A)
  output logic        spm_en,
  output logic [3:0]  spm_we,
  output logic [31:0] spm_a,
  output logic [31:0] spm_wdata,
  input  logic [31:0] spm_rdata,
  // DRAM word port
  output logic        dram_req,
  output logic        dram_we,
  output logic [31:0] dram_a,
  output logic [31:0] dram_wdata,
  input  logic        dram_ack,
  input  logic [31:0] dram_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_GRANT, S_RD_DRAM, S_WR_SPM, S_RD_SPM, S_WAIT_SPM, S_WR_DRAM, S_RELEASE} state_e;
  state_e      state;
  logic [31:0] sa, da, word;
  logic [15:0] left;

  assign busy = (state != S_IDLE);
  assign dreq = busy && (state != S_RELEASE);
  assign done = (state == S_RELEASE);

  always_comb begin
    spm_en     = 1'b0;
    spm_we     = 4'h0;
    spm_a      = sa;
    spm_wdata  = word;
    dram_req   = 1'b0;
    dram_we    = 1'b0;
    dram_a     = da;
    dram_wdata = word;
    unique case (state)
      S_RD_DRAM: dram_req = 1'b1;
      S_WR_SPM:  begin spm_en = 1'b1; spm_we = 4'hF; end
      S_RD_SPM:  spm_en = 1'b1;
      S_WR_DRAM: begin dram_req = 1'b1; dram_we = 1'b1; end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      sa    <= '0;
      da    <= '0;
      word  <= '0;
      left  <= '0;
      to_bs <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          sa    <= spm_addr;
          da    <= dram_addr;
          left  <= len_words;
          to_bs <= !(to_spm && spm_not_full);
          state <= S_GRANT;
        end
        S_GRANT: if (dgrant) begin
          if (left == 0)  state <= S_RELEASE;
          else if (to_bs) state <= S_RD_SPM;
          else            state <= S_RD_DRAM;
        end
        S_RD_DRAM: if (dram_ack) begin
          word  <= dram_rdata;
          state <= S_WR_SPM;
        end
        S_WR_SPM: begin
          sa    <= sa + 32'd4;
          da    <= da + 32'd4;
          left  <= left - 16'd1;
          state <= (left == 16'd1) ? S_RELEASE : S_RD_DRAM;
        end
        S_RD_SPM:   state <= S_WAIT_SPM;
        S_WAIT_SPM: begin
          word  <= spm_rdata;
          state <= S_WR_DRAM;
        end
        S_WR_DRAM: if (dram_ack) begin
          sa    <= sa + 32'd4;
          da    <= da + 32'd4;
          left  <= left - 16'd1;
          state <= (left == 16'd1) ? S_RELEASE : S_RD_SPM;
        end
        S_RELEASE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_grant_held: assert property (@(posedge clk) disable iff (rst)
    (state inside {S_RD_DRAM, S_WR_SPM, S_RD_SPM, S_WAIT_SPM, S_WR_DRAM}) |-> dgrant);
endmodule
