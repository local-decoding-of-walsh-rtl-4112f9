// font_rom_model: stand-in for the bitmap font ROM, for simulation only.
// It is not a real font: row bits are a fixed scramble of the address,
// row = {addr[10:7] ^ addr[3:0], addr[6:4] ^ addr[2:0], addr[3]} with
// space (ASCII 0x20) blank, so a testbench can predict every pixel. One
// cycle of read latency, like the block ROM it replaces.
module font_rom_model (
  input  logic        clk,
  input  logic [10:0] addr,
  output logic [7:0]  row
);
  always_ff @(posedge clk)
    row <= (addr[10:4] == 7'h20) ? 8'h00
         : {addr[10:7] ^ addr[3:0], addr[6:4] ^ addr[2:0], addr[3]};
endmodule
