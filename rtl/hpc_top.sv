// hpc_top: the two accelerators side by side, each with its own ports.
//
//  * FMCW radar DSP unit (fmcw_radar_dsp): ADC samples in, range and
//    velocity of the strongest target out.
//  * Database join hardware: the sort-merge join (join_accel: two bitonic
//    sorters and a merge join) and the nested-loop join compute unit
//    (nested_loop_join), the two join implementations that are compared.
//    They share no state; each is driven through its own ports.
//
// The accelerators share only clock and reset. In the FPGA flow each kernel
// would be reached from the host over PCIe and off-chip DDR through an AXI
// interconnect; those are vendor infrastructure and are represented here by
// the plain load/stream ports of each block.
module hpc_top
  import join_pkg::*;
#(
  parameter int unsigned RADAR_N  = 2048,
  parameter int unsigned DECIM    = 8,
  parameter int unsigned ADC_W    = 16,
  parameter int unsigned FRAC     = 8,
  parameter int unsigned JOIN_N   = 8192,
  parameter int unsigned BLOCK    = 512,
  parameter int unsigned LANES    = 16
) (
  input  logic                                clk,
  input  logic                                rst_n,
  // radar
  input  logic                                adc_valid,
  input  logic signed [ADC_W-1:0]             adc_data,
  output logic                                peak_valid,
  output logic [$clog2(RADAR_N)-1:0]          peak_bin,
  output logic signed [$clog2(RADAR_N)+FRAC:0] peak_pos,
  output logic                                rv_valid,
  output logic signed [31:0]                  range_cm,
  output logic signed [31:0]                  vel_cms,
  // sort-merge join
  input  logic                                sm_ld_en,
  input  logic                                sm_ld_tbl,
  input  logic [$clog2(JOIN_N)-1:0]           sm_ld_addr,
  input  key_t                                sm_ld_key,
  input  logic                                sm_start,
  output logic                                sm_busy,
  output logic                                sm_done,
  output logic                                sm_out_valid,
  input  logic                                sm_out_ready,
  output idx_t                                sm_out_a_idx,
  output idx_t                                sm_out_b_idx,
  output key_t                                sm_out_value,
  output logic [15:0]                         sm_n_sort_local,
  output logic [15:0]                         sm_n_merge_local,
  output logic [15:0]                         sm_n_merge_global,
  output logic [31:0]                         sm_n_matches,
  output logic [31:0]                         sm_n_stalls,
  // nested-loop join
  input  logic                                nl_a_wr_en,
  input  logic [$clog2(JOIN_N/LANES)-1:0]     nl_a_wr_row,
  input  key_t                                nl_a_wr_data [LANES],
  input  logic [$clog2(JOIN_N):0]             nl_a_len,
  input  logic                                nl_start,
  input  logic                                nl_b_valid,
  output logic                                nl_b_ready,
  input  key_t                                nl_b_key,
  input  logic                                nl_b_last,
  output logic                                nl_out_valid,
  input  logic                                nl_out_ready,
  output logic [31:0]                         nl_out_slot,
  output logic [LANES-1:0]                    nl_out_lane_valid,
  output key_t                                nl_out_a [LANES],
  output key_t                                nl_out_b [LANES],
  output key_t                                nl_out_val [LANES],
  output logic                                nl_done,
  output logic [31:0]                         nl_n_matches,
  output logic [31:0]                         nl_n_stalls
);

  fmcw_radar_dsp #(.N(RADAR_N), .DECIM(DECIM), .ADC_W(ADC_W), .FRAC(FRAC)) u_radar (
    .clk, .rst_n,
    .adc_valid, .adc_data,
    .peak_valid, .peak_bin, .peak_pos,
    .rv_valid, .range_cm, .vel_cms
  );

  join_accel #(.N(JOIN_N), .BLOCK(BLOCK)) u_sort_merge (
    .clk, .rst_n,
    .ld_en(sm_ld_en), .ld_tbl(sm_ld_tbl), .ld_addr(sm_ld_addr), .ld_key(sm_ld_key),
    .start(sm_start), .busy(sm_busy), .done(sm_done),
    .out_valid(sm_out_valid), .out_ready(sm_out_ready),
    .out_a_idx(sm_out_a_idx), .out_b_idx(sm_out_b_idx), .out_value(sm_out_value),
    .n_sort_local(sm_n_sort_local), .n_merge_local(sm_n_merge_local),
    .n_merge_global(sm_n_merge_global),
    .n_matches(sm_n_matches), .n_stalls(sm_n_stalls)
  );

  nested_loop_join #(.NA(JOIN_N), .LANES(LANES)) u_nested (
    .clk, .rst_n,
    .a_wr_en(nl_a_wr_en), .a_wr_row(nl_a_wr_row), .a_wr_data(nl_a_wr_data),
    .a_len(nl_a_len), .start(nl_start),
    .b_valid(nl_b_valid), .b_ready(nl_b_ready), .b_key(nl_b_key), .b_last(nl_b_last),
    .out_valid(nl_out_valid), .out_ready(nl_out_ready), .out_slot(nl_out_slot),
    .out_lane_valid(nl_out_lane_valid), .out_a(nl_out_a), .out_b(nl_out_b),
    .out_val(nl_out_val), .done(nl_done),
    .n_matches(nl_n_matches), .n_stalls(nl_n_stalls)
  );

endmodule
