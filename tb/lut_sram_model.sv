// lut_sram_model -- behavioural model of one external 32-bit table SRAM bank.
//
// Synchronous read: address and enable are sampled on a rising clock edge
// and the word appears on rdata after that edge, held until the next read.
// Only the table region (DEPTH words from address 0) is modelled; the model
// fills it itself at time 0 with the contents the host would load (see
// lns_tb_pkg::tab_word), standing in for the board memory and its loader.
module lut_sram_model
  import lns_pkg::*;
#(
  parameter int BANK  = 0,
  parameter int DEPTH = 4096
) (
  input  logic               clk,
  input  logic               en,
  input  logic [SRAM_AW-1:0] addr,
  output logic [31:0]        rdata
);

  logic [31:0] mem [DEPTH];

  initial begin
    for (int k = 0; k < DEPTH; k++) mem[k] = lns_tb_pkg::tab_word(BANK, k);
    rdata = '0;
  end

  always_ff @(posedge clk) begin
    if (en) begin
      assert (int'(addr) < DEPTH) else $error("table read outside the modelled region: %0d", addr);
      rdata <= mem[int'(addr) % DEPTH];
    end
  end

endmodule
