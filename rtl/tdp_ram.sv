// tdp_ram -- true dual-port block RAM of one pipeline stage.
//
// Port A only reads (search lane A). Port B reads for search lane B, or, in a
// cycle where b_we is set, writes an update instead. Reads are synchronous:
// data appears the cycle after the address. When port A reads the word that
// port B writes in the same cycle it gets the old word (read-first). Contents
// start at zero, as FPGA block RAM does after configuration. Sharing one
// memory between two lanes doubles throughput without doubling storage, as
// in the published design; read-first and zero start are this design's choice.
module tdp_ram #(
  parameter int DW = 51,
  parameter int AW = 4
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic [AW-1:0] a_addr,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [2**AW];

  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;

  always_ff @(posedge clk) begin
    if (a_en) a_rdata <= mem[a_addr];
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata     <= mem[b_addr];
    end
  end
endmodule
