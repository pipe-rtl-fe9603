// pipe_regfile: foreground and background register files.
//
// Two banks of 8 words. In each bank R0-R6 are general registers; R7 is not
// a data register (the field value 7 names a queue) and holds the saved
// program counter. `fg` tells which physical bank is the foreground file;
// all ordinary instructions use it. A call or return exit pulses `swap`,
// which exchanges the roles of the two files, and at the same time writes
// the return address into R7 of the bank that becomes background
// (`pc_we`, `pc_bank`). Copies between the files (Ri <- BRj, BRi <- Rj) use
// the physical bank addresses the issue logic builds from `fg`.
//
// Addresses are {bank, index}. Three combinational read ports serve the
// issue stage; one write port serves the execute stage. Registers reset to
// 0 and bank 0 starts as foreground (the document gives no reset state).
// The file arrangement follows the document; port counts are this design's.
module pipe_regfile
  import pipe_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       swap,
  output logic       fg,
  input  logic [3:0] raddr_a,
  input  logic [3:0] raddr_b,
  input  logic [3:0] raddr_c,
  output word_t      rdata_a,
  output word_t      rdata_b,
  output word_t      rdata_c,
  input  logic       we,
  input  logic [3:0] waddr,
  input  word_t      wdata,
  input  logic       pc_we,
  input  logic       pc_bank,
  input  word_t      pc_wdata
);
  word_t regs [16];

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];
  assign rdata_c = regs[raddr_c];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fg <= 1'b0;
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else begin
      if (swap) fg <= ~fg;
      if (we) regs[waddr] <= wdata;
      if (pc_we) regs[{pc_bank, 3'd7}] <= pc_wdata;
    end
  end

  a_no_write_clash: assert property (@(posedge clk) disable iff (!rst_n)
                                     (we && pc_we) |-> (waddr != {pc_bank, 3'd7}));
endmodule
