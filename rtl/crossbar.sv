// crossbar: NIN x NOUT flit switch built from multiplexers.
//
// The router has two such switches working side by side: one moves flits from
// the input queues into the shared queues, the other moves flits from the input
// queues and the shared queues to the output ports. Each output takes the flit
// and valid bit of the input named by its select; an output whose sel_en is low
// is idle (out_valid low). The switch is purely combinational. The select
// registers live in the allocators that own the connections.
module crossbar #(
  parameter int NIN   = 5,
  parameter int NOUT  = 5,
  parameter int WIDTH = 34,
  localparam int SW   = (NIN > 1) ? $clog2(NIN) : 1
) (
  input  logic [WIDTH-1:0] in_data  [NIN],
  input  logic [NIN-1:0]   in_valid,
  input  logic [SW-1:0]    sel      [NOUT],
  input  logic [NOUT-1:0]  sel_en,
  output logic [WIDTH-1:0] out_data [NOUT],
  output logic [NOUT-1:0]  out_valid
);

  always_comb begin
    for (int o = 0; o < NOUT; o++) begin
      out_data[o]  = in_data[sel[o]];
      out_valid[o] = sel_en[o] && in_valid[sel[o]];
    end
  end

endmodule
