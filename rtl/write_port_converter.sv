// write_port_converter: 1-to-4 write-port converter of one bank.
//
// The bank has a single write port, but four write ports of the register
// file reach it. The access conflict manager raises at most one bit of
// sel (Bank Select) per bank; this block passes the row address and the
// data of that port to the bank's write port and enables the write. With
// no bit set the bank is not written. Combinational; the write itself
// happens at the next rising clock edge in the cell array.
module write_port_converter #(
  parameter int unsigned NUM_PORTS = rf_pkg::WR_PORTS,
  parameter int unsigned ADDR_W    = rf_pkg::ROW_W,
  parameter int unsigned DATA_W    = rf_pkg::DATA_W
) (
  input  logic [NUM_PORTS-1:0]             sel,
  input  logic [NUM_PORTS-1:0][ADDR_W-1:0] port_addr,
  input  logic [NUM_PORTS-1:0][DATA_W-1:0] port_data,
  output logic                             bank_we,
  output logic [ADDR_W-1:0]                bank_addr,
  output logic [DATA_W-1:0]                bank_data
);
  // AND-OR multiplexer: sel is one-hot or zero.
  always_comb begin
    bank_we   = |sel;
    bank_addr = '0;
    bank_data = '0;
    for (int unsigned p = 0; p < NUM_PORTS; p++) begin
      bank_addr |= port_addr[p] & {ADDR_W{sel[p]}};
      bank_data |= port_data[p] & {DATA_W{sel[p]}};
    end
  end

  always_comb assert ($onehot0(sel));
endmodule
