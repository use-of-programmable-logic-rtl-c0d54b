// lut_ram: lookup-table memory with one write port (configuration) and one
// registered read port (data path).  Written as an array so that an FPGA
// tool maps it to block or distributed RAM.  The read port updates when
// `re` is high; `rdata` holds otherwise.  Contents are undefined until
// written: the tables are loaded through the configuration bus before use.
module lut_ram #(
  parameter int AW = 10,
  parameter int DW = 10
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
