// sbox_dpram: dual-port 256 x 8 block RAM holding the AES S-box.
// Each port has an address, write data and write enable, and a registered
// read output (one clock of read latency, as a block RAM). The RAM is in
// "no read on write" mode: in a cycle where a port writes, its output keeps
// the previous value. In the SubBytes unit both write ports are tied to zero
// so the RAM acts as a two-port ROM, which is how the original design uses
// it. The initial contents are computed by aes_pkg::sbox_table() from the
// S-box definition; the read latency and the write-collision rule (port B
// wins) are this design's choices.
module sbox_dpram
  import aes_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    addra,
  input  logic [WIDTH-1:0] dina,
  input  logic             wea,
  output logic [WIDTH-1:0] a,
  input  logic [AW-1:0]    addrb,
  input  logic [WIDTH-1:0] dinb,
  input  logic             web,
  output logic [WIDTH-1:0] b
);

  localparam sbox_table_t SBOX = sbox_table();

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = WIDTH'(SBOX[i % 256]);
  end

  always_ff @(posedge clk) begin
    if (wea) mem[addra] <= dina;
    if (web) mem[addrb] <= dinb;
  end

  always_ff @(posedge clk) begin
    if (!wea) a <= mem[addra];
    if (!web) b <= mem[addrb];
  end

endmodule
