// read_unit: second-level read data path of the multi-bank register file.
//
// Each bank drives, for each of the 8 read ports, a valid bit and a word
// that is zero unless valid. Since a port is served by at most one bank in
// a cycle, the word a port receives is the OR of what the banks drive for
// it, and its valid bit the OR of the banks' valid bits. Combinational;
// the source design names this unit and places it at the bottom of the
// bank column, and the OR-bus is this design's own reading of it.
module read_unit #(
  parameter int unsigned NUM_BANKS = rf_pkg::NUM_BANKS,
  parameter int unsigned RD_PORTS  = rf_pkg::RD_PORTS,
  parameter int unsigned DATA_W    = rf_pkg::DATA_W
) (
  input  logic [NUM_BANKS-1:0][RD_PORTS-1:0]             bank_valid,
  input  logic [NUM_BANKS-1:0][RD_PORTS-1:0][DATA_W-1:0] bank_data,
  output logic [RD_PORTS-1:0]                            port_valid,
  output logic [RD_PORTS-1:0][DATA_W-1:0]                port_data
);
  always_comb begin
    port_valid = '0;
    port_data  = '0;
    for (int unsigned b = 0; b < NUM_BANKS; b++) begin
      port_valid |= bank_valid[b];
      for (int unsigned p = 0; p < RD_PORTS; p++)
        port_data[p] |= bank_data[b][p];
    end
  end

endmodule
