// slice_and_tag: turns one stored readout into a package.
//
// When idle the module takes a readout from its CMI input (in_next low) and
// then sends, on consecutive cycles unless the output stalls, a header word
// (flag 1, payload = interface number INTF and the readout's label) and
// N_SLICE data words (flag 0), each carrying PKG_DW bits of the value,
// most significant slice first. Only the low N_SLICE*PKG_DW bits of the
// value are sent. While a package is being sent in_next is high. A package
// of N_SLICE+1 words thus takes N_SLICE+1 cycles plus one idle cycle
// before the next readout is taken.
//
// Header with label and interface number, and slicing of the value into
// several words, follow the original design; the word layout (see ssdr_pkg) is this
// design's choice.
module slice_and_tag
  import ssdr_pkg::*;
#(
  parameter intf_t       INTF    = 4'd0,
  parameter int unsigned N_SLICE = 2
) (
  input  logic      clk,
  input  logic      rst_n,
  input  readout_t  in_data,
  input  logic      in_vld,
  output logic      in_next,
  output pkg_word_t out_data,
  output logic      out_vld,
  input  logic      out_next
);

  localparam int unsigned CNT_W = $clog2(N_SLICE + 1) + 1;

  readout_t         held;
  logic             active;
  logic [CNT_W-1:0] cnt;      // 0: header, k: data slice k

  assign in_next = active;
  assign out_vld = active;

  int unsigned s;   // slices still to come after this one

  always_comb begin
    s        = 0;
    out_data = '0;
    if (cnt == '0) begin
      out_data.hdr     = 1'b1;
      out_data.payload = make_header(INTF, held.addr);
    end else begin
      s = N_SLICE - 32'(cnt);
      out_data.hdr     = 1'b0;
      out_data.payload = PKG_DW'(held.data >> (s * PKG_DW));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      held   <= '0;
      active <= 1'b0;
      cnt    <= '0;
    end else if (!active) begin
      if (in_vld) begin
        held   <= in_data;
        active <= 1'b1;
        cnt    <= '0;
      end
    end else if (!out_next) begin
      if (32'(cnt) == N_SLICE) begin
        active <= 1'b0;
        cnt    <= '0;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
