// priority_resolve: the priority resolve unit of the priority TCAM block.
//
// Takes the hit flag and matched address of each TCAM and selects the
// highest-priority hit: TCAM i has priority over TCAM j when i < j (TCAM 0
// here is the scheme's "1st TCAM"). The output is the associated-memory
// address {TCAM number, entry address} of the selected entry, which gives each
// TCAM its own region of the associated memory. The priority rule follows the
// scheme; the address concatenation is this design's choice.
// Purely combinational.
module priority_resolve
  import ptcam_pkg::*;
#(
  parameter int unsigned NT  = 4,            // number of TCAMs (priority classes)
  parameter int unsigned AW  = 7,            // entry address width of one TCAM
  parameter int unsigned TW  = (NT > 1) ? $clog2(NT) : 1
) (
  input  logic [NT-1:0]         hit,
  input  logic [NT-1:0][AW-1:0] addr,
  output logic                  any_hit,
  output logic [TW-1:0]         sel,         // winning TCAM
  output logic [TW+AW-1:0]      mem_addr     // associated memory address
);

  always_comb begin
    any_hit = 1'b0;
    sel     = '0;
    for (int t = NT - 1; t >= 0; t--)
      if (hit[t]) begin
        any_hit = 1'b1;
        sel     = TW'(t);
      end
    mem_addr = {sel, addr[sel]};
  end

endmodule
