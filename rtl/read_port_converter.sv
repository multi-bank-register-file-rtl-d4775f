// read_port_converter: 1-to-8 read-port converter of one bank.
//
// The bank has a single read port, but eight read ports of the register
// file reach it. Address half: the access conflict manager raises at most
// one bit of sel (Bank Select); the row address of that port goes to the
// bank's read port and the read is enabled. Data half: the word the bank
// reads out after the next rising edge is handed back to the same port,
// whose bit of port_valid is then high; the others see zero. The select is
// kept in a register for that one cycle, since the data leaves the bank one
// clock after the address was applied.
module read_port_converter #(
  parameter int unsigned NUM_PORTS = rf_pkg::RD_PORTS,
  parameter int unsigned ADDR_W    = rf_pkg::ROW_W,
  parameter int unsigned DATA_W    = rf_pkg::DATA_W
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // address half (clock-low phase)
  input  logic [NUM_PORTS-1:0]             sel,
  input  logic [NUM_PORTS-1:0][ADDR_W-1:0] port_addr,
  output logic                             bank_re,
  output logic [ADDR_W-1:0]                bank_addr,
  // data half (after the rising edge)
  input  logic [DATA_W-1:0]                bank_data,
  output logic [NUM_PORTS-1:0]             port_valid,
  output logic [NUM_PORTS-1:0][DATA_W-1:0] port_data
);
  logic [NUM_PORTS-1:0] sel_q;

  always_comb begin
    bank_re   = |sel;
    bank_addr = '0;
    for (int unsigned p = 0; p < NUM_PORTS; p++)
      bank_addr |= port_addr[p] & {ADDR_W{sel[p]}};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sel_q <= '0;
    else        sel_q <= sel;
  end

  always_comb begin
    port_valid = sel_q;
    for (int unsigned p = 0; p < NUM_PORTS; p++)
      port_data[p] = bank_data & {DATA_W{sel_q[p]}};
  end

  always_comb assert ($onehot0(sel));
endmodule
