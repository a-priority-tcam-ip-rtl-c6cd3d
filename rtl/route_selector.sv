// route_selector: the selector at the output of the lookup engine.
//
// The compact lookup and the priority TCAM work on the same destination in
// lockstep. When the priority TCAM hits, its next hop wins, since every TCAM
// prefix is longer than any compact-lookup prefix; otherwise the compact
// lookup's next hop is passed on. The choice rule follows the scheme; the
// output register (one cycle) and the source tag are this design's choices.
// An assertion checks that the two results arrive in the same cycle.
module route_selector
  import ptcam_pkg::*;
#(
  parameter int unsigned TW = 2               // width of the TCAM class number
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     cmp_valid,
  input  hop_t     cmp_hop,
  input  hop_src_e cmp_src,
  input  logic     tcam_valid,
  input  logic     tcam_hit,
  input  hop_t     tcam_hop,
  input  logic [TW-1:0] tcam_class,
  output logic     out_valid,
  output hop_t     out_hop,
  output hop_src_e out_src,
  output logic [TW-1:0] out_class          // winning TCAM when out_src = SRC_TCAM
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hop   <= '0;
      out_src   <= SRC_ADH_ONLY;
      out_class <= '0;
    end else begin
      out_valid <= cmp_valid;
      if (cmp_valid) begin
        if (tcam_hit) begin
          out_hop <= tcam_hop;
          out_src <= SRC_TCAM;
          out_class <= tcam_class;
        end else begin
          out_hop <= cmp_hop;
          out_src <= cmp_src;
          out_class <= '0;
        end
      end
    end
  end

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) cmp_valid == tcam_valid)
    else $error("route_selector: compact and TCAM results out of step");

endmodule
