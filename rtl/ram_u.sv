// ram_u - simple dual-port RAM with independent write and read clocks.
//
// One instance each serves as the send RAM (written by the host side, read by the
// data exchange) and as the receive RAM (written by the channel state machine, read
// by the host side). Port names follow the RAM symbol of the original design:
// data/wraddress/wren/wrclock on the write side, rdaddress/rdclock/q on the read
// side, plus reset. Depth 32 and width 32 are the sizes printed on that symbol.
//
// Timing: a write happens on the rising wrclock edge with wren high. The read is
// synchronous: q shows the entry addressed at the previous rising rdclock edge
// (one cycle latency). reset (synchronous to rdclock, active high) clears q only;
// the array itself is not cleared, as in a block RAM. Reading an entry on the same
// edge it is written from the other clock returns either value.
module ram_u #(
  parameter int unsigned DATA_W = 32,
  parameter int unsigned ADDR_W = 5
) (
  input  logic              reset,
  // write port
  input  logic              wrclock,
  input  logic              wren,
  input  logic [ADDR_W-1:0] wraddress,
  input  logic [DATA_W-1:0] data,
  // read port
  input  logic              rdclock,
  input  logic [ADDR_W-1:0] rdaddress,
  output logic [DATA_W-1:0] q
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge wrclock) begin
    if (wren) mem[wraddress] <= data;
  end

  always_ff @(posedge rdclock) begin
    if (reset) q <= '0;
    else       q <= mem[rdaddress];
  end

endmodule
