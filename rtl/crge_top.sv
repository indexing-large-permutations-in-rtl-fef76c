// crge_top -- the CRGE permutation generators side by side.
//
// Four independent generators, each with its own ports (prefixes sr_, pp_,
// ds_ and ht_):
//   sr_  crge_shiftreg    full n-element permutation, n cycles, all elements
//                         presented in parallel once ready is high;
//   pp_  crge_partial     only the elements listed in PP_ELEMS, one block and
//                         one counter each;
//   ds_  crge_distributed the block chain split into NSEG device segments,
//                         elements streamed out one per cycle;
//   ht_  crge_throughput  fully pipelined, one permutation per cycle.
// They share only the clock. Each rst input is synchronous and starts that
// generator (for ht_ it only clears the valid pipeline). The sizes are those
// of the original evaluation: n = 8192 for the sequential designs and n = 32
// for the high throughput design; the partial element list and the number
// of segments are choices of this design.
module crge_top
  import crge_pkg::*;
#(
  parameter int unsigned N     = 8192,            // sequential designs
  parameter int unsigned W     = elem_width(N),
  parameter int unsigned PP_K  = 4,
  parameter int unsigned PP_ELEMS [PP_K] = '{0, 1, N/2, N-1},
  parameter int unsigned NSEG  = 4,
  parameter int unsigned HT_N  = 32,              // high throughput design
  parameter int unsigned HT_W  = elem_width(HT_N)
) (
  input  logic            clk,
  // shift register generator
  input  logic            sr_rst,
  input  logic [W-1:0]    sr_digit [1:N-1],
  output logic            sr_ready,
  output logic [W-1:0]    sr_perm  [N],
  // partial permutation generator
  input  logic            pp_rst,
  input  logic [W-1:0]    pp_digit [1:N-1],
  output logic            pp_ready,
  output logic [W-1:0]    pp_elem  [PP_K],
  // distributed generator
  input  logic            ds_rst,
  input  logic [W-1:0]    ds_digit [1:N-1],
  output logic            ds_elem_valid,
  output logic [W-1:0]    ds_elem_idx,
  output logic [W-1:0]    ds_elem_val,
  output logic            ds_done,
  // high throughput generator
  input  logic            ht_rst,
  input  logic            ht_in_valid,
  input  logic [HT_W-1:0] ht_digit [1:HT_N-1],
  output logic            ht_out_valid,
  output logic [HT_W-1:0] ht_perm  [HT_N]
);

  crge_shiftreg #(.N(N), .W(W)) u_sr (
    .clk   (clk),
    .rst   (sr_rst),
    .digit (sr_digit),
    .ready (sr_ready),
    .perm  (sr_perm)
  );

  crge_partial #(.N(N), .K(PP_K), .ELEMS(PP_ELEMS), .W(W)) u_pp (
    .clk   (clk),
    .rst   (pp_rst),
    .digit (pp_digit),
    .ready (pp_ready),
    .elem  (pp_elem)
  );

  crge_distributed #(.N(N), .NSEG(NSEG), .W(W)) u_ds (
    .clk        (clk),
    .rst        (ds_rst),
    .digit      (ds_digit),
    .elem_valid (ds_elem_valid),
    .elem_idx   (ds_elem_idx),
    .elem_val   (ds_elem_val),
    .done       (ds_done)
  );

  crge_throughput #(.N(HT_N), .W(HT_W)) u_ht (
    .clk       (clk),
    .rst       (ht_rst),
    .in_valid  (ht_in_valid),
    .digit     (ht_digit),
    .out_valid (ht_out_valid),
    .perm      (ht_perm)
  );

endmodule
