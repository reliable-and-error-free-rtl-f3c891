// crossbar: the 5x5 cross-point matrix between input and output channels.
//
// Input side: a 1:5 demultiplexer per input steers that input's code word and
// valid bit to lane demux_sel[p] (a 3-bit port code) while demux_en[p] is
// high. Output side: one 5:1 multiplexer per output port picks input
// mux_sel[q] while mux_en[q] is high. A connection p -> q exists when both
// ends agree (mux_sel[q] = p and demux_sel[p] = q); otherwise output q shows
// zeros with valid low. Both selects are set by the granting output channel,
// so several input/output pairs can be connected at the same time. The
// multiplexer/demultiplexer structure and 3-bit selects are as described for
// the design; the separate enables and the zero value of an idle output are
// this design's own choices. Purely combinational.
module crossbar
  import noc_pkg::*;
#(
  parameter int unsigned W = noc_pkg::CODE_W,
  parameter int unsigned P = noc_pkg::NPORTS
) (
  input  logic [P-1:0][W-1:0]      in_data,
  input  logic [P-1:0]             in_valid,
  input  logic [P-1:0][PORT_BITS-1:0] mux_sel,
  input  logic [P-1:0]             mux_en,
  input  logic [P-1:0][PORT_BITS-1:0] demux_sel,
  input  logic [P-1:0]             demux_en,
  output logic [P-1:0][W-1:0]      out_data,
  output logic [P-1:0]             out_valid
);

  always_comb begin
    for (int unsigned q = 0; q < P; q++) begin
      out_data[q]  = '0;
      out_valid[q] = 1'b0;
      if (mux_en[q] && (int'(mux_sel[q]) < int'(P)) &&
          demux_en[mux_sel[q]] && (int'(demux_sel[mux_sel[q]]) == int'(q))) begin
        out_data[q]  = in_data[mux_sel[q]];
        out_valid[q] = in_valid[mux_sel[q]];
      end
    end
  end

endmodule
