// crge_distributed -- CRGE distributed model: the chain of computation blocks
// f_1 .. f_{n-1} cut into NSEG segments, each standing for one device.
//
// Segment s holds a contiguous run of blocks and receives only the digits of
// those blocks. Instead of keeping its last block's output, a segment hands it
// to the next segment, whose first intermediate register takes it; the first
// segment takes 0 there (the f_0 multiplexer). The last segment streams the
// finished elements out: sigma(n-1) in cycle 1 after reset, sigma(n-2) in
// cycle 2, ..., sigma(0) in cycle n. A down-counter marks which element is on
// the stream.
//
// How many blocks each device gets is the parameter SEG_BLOCKS (one count
// per segment, summing to n-1). The original description suggests giving the
// first devices more blocks and the later, wider-block devices fewer; all
// zeros, the default, is this design's fallback of NSEG nearly equal runs. The link between segments is unregistered, which keeps
// the cycle timing identical to one undivided chain.
//
// Interface: rst (synchronous) starts; digit[] must stay stable until done.
// In each of the n cycles after reset elem_valid is high, elem_idx names the
// element and elem_val is its value. done is high once all have been sent.
module crge_distributed
  import crge_pkg::*;
#(
  parameter int unsigned N    = 8192,          // permutation size
  parameter int unsigned NSEG = 4,             // number of segments (devices)
  parameter int unsigned SEG_BLOCKS [NSEG] = '{default: 0},  // blocks per segment
  parameter int unsigned W    = elem_width(N)  // element width
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] digit [1:N-1],
  output logic         elem_valid,
  output logic [W-1:0] elem_idx,
  output logic [W-1:0] elem_val,
  output logic         done
);

  localparam int unsigned CW = $clog2(N + 1);

  logic [W-1:0]  link [NSEG+1];  // link[s] enters segment s
  logic [CW-1:0] remaining;

  // First block of segment s (seg_first(NSEG) = N).
  function automatic int unsigned seg_first(int unsigned s);
    int unsigned total = 0, first = 1;
    for (int unsigned j = 0; j < NSEG; j++) total += SEG_BLOCKS[j];
    if (total == 0) return 1 + (s * (N - 1)) / NSEG;
    for (int unsigned j = 0; j < s; j++) first += SEG_BLOCKS[j];
    return first;
  endfunction

  assign link[0] = '0;

  for (genvar s = 0; s < NSEG; s++) begin : g_dev
    localparam int unsigned LO = seg_first(s);
    localparam int unsigned HI = seg_first(s + 1) - 1;
    logic [W-1:0] dev_digit [LO:HI];  // the digits this device receives

    for (genvar i = LO; i <= HI; i++) begin : g_dig
      assign dev_digit[i] = digit[i];
    end

    crge_segment #(.LO(LO), .HI(HI), .W(W)) u_seg (
      .clk   (clk),
      .rst   (rst),
      .digit (dev_digit),
      .x_in  (link[s]),
      .y_out (link[s+1])
    );
  end

  always_ff @(posedge clk) begin
    if (rst)                remaining <= CW'(N);
    else if (remaining != 0) remaining <= remaining - 1'b1;
  end

  assign elem_valid = (remaining != 0) && !rst;
  assign elem_idx   = W'(remaining - 1'b1);
  assign elem_val   = link[NSEG];
  assign done       = (remaining == 0);

  initial begin
    assert (NSEG >= 1 && NSEG <= N - 1)
      else $error("crge_distributed: NSEG=%0d invalid for N=%0d", NSEG, N);
    assert (seg_first(NSEG) == N)
      else $error("crge_distributed: SEG_BLOCKS must sum to N-1");
  end

endmodule
