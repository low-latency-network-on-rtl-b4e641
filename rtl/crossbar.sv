// crossbar: the switch of a 5-port mesh router.
//
// One (P-1):1 multiplexer per output port, steered by a binary input index
// (plain multiplexers, which the published design prefers over one-hot ones on FPGAs).
// An output never selects its own input port (no U-turns). out_wr follows
// valid. Purely combinational; the router registers sel and valid at the end
// of the allocation cycle, so this is the second pipeline stage.
module crossbar
  import noc_pkg::*;
#(
  parameter int FW = 38
) (
  input  logic [P-1:0][FW-1:0] in_flit,
  input  logic [P-1:0][PW-1:0] sel,
  input  logic [P-1:0]         valid,
  output logic [P-1:0][FW-1:0] out_flit,
  output logic [P-1:0]         out_wr
);

  for (genvar o = 0; o < P; o++) begin : g_out
    logic [P-2:0][FW-1:0] cand;        // the P-1 other input ports
    logic [PW-1:0]        k;           // index among them
    for (genvar c = 0; c < P - 1; c++) begin : g_c
      assign cand[c] = in_flit[(c < o) ? c : c + 1];
    end
    assign k           = (sel[o] > PW'(o)) ? sel[o] - 1'b1 : sel[o];
    assign out_flit[o] = (k < PW'(P - 1)) ? cand[k] : '0;
    assign out_wr[o]   = valid[o];
  end

endmodule
