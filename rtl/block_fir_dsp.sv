// Single-multiplier DSP core that runs a direct-form FIR filter by data block
// processing.
//
// A conventional single-MAC FIR fetches a new sample and a new coefficient for
// every product, so both multiplier inputs and both memory buses switch on
// every cycle. Here the outputs are produced in blocks of L. One coefficient
// is fetched and multiplied by the L samples of a window held in a small
// register file, each product going to its own accumulator; for the next
// coefficient only one new sample is fetched, replacing the oldest, and the
// registers are read in rotated order. The coefficient input of the
// multiplier therefore changes once per L products, and per output the
// memories see N/L coefficient reads and 1+(N-1)/L sample reads instead of N
// of each.
//
// Blocks: input_unit (sample stream into the circular data_memory),
// coef_memory (loaded by the host), block_controller (sequencing),
// data_register_file (R_0..R_{L-1}), mac_unit (operand registers, gate-level
// array_multiplier, accumulator_bank ACC_0..ACC_{L-1}) and output_unit
// (stream of results).
//
// Interface:
//   num_taps, block_len  filter length N (1..MAX_TAPS) and block size L
//                        (1..MAX_BLOCK); read at the start of every block, so
//                        change them only while no block is in progress
//                        (normally: hold them and pulse reset).
//   coef_we/waddr/wdata  host write of h(k) at address k.
//   in_valid/in_data/in_ready    input samples, two's complement DATA_W bits.
//   out_valid/out_data/out_last/out_ready  outputs y(n) in order, full
//                        precision (ACC_W bits, two's complement); out_last
//                        marks the end of each block of L.
//   init_done            high once the sample memory has been cleared after
//                        reset (DMEM_DEPTH cycles); samples before the first
//                        one count as zero.
// Timing: one multiplication per cycle; a block of L outputs takes
// N*L + 2L + 4 cycles when input is waiting and the output is ready.
// Reset is synchronous and active low.
// The block scheme, its memory-access counts and the gate-level two's
// complement array multiplier follow the published scheme; the streaming interfaces,
// the memory sizes, the pipeline and the runtime choice of N and L are this
// design's own.
module block_fir_dsp
  import block_fir_pkg::*;
#(
  parameter int unsigned DATA_W     = 16,
  parameter int unsigned MAX_BLOCK  = 16,
  parameter int unsigned MAX_TAPS   = 128,
  parameter int unsigned DMEM_DEPTH = 256,
  parameter int unsigned ACC_W      = 2 * DATA_W + $clog2(MAX_TAPS)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [$clog2(MAX_TAPS+1)-1:0]  num_taps,
  input  logic [$clog2(MAX_BLOCK+1)-1:0] block_len,
  input  logic                           coef_we,
  input  logic [$clog2(MAX_TAPS)-1:0]    coef_waddr,
  input  logic [DATA_W-1:0]              coef_wdata,
  input  logic                           in_valid,
  input  logic [DATA_W-1:0]              in_data,
  output logic                           in_ready,
  output logic                           out_valid,
  output logic [ACC_W-1:0]               out_data,
  output logic                           out_last,
  input  logic                           out_ready,
  output logic                           init_done
);
  localparam int unsigned CNT_W = 32;
  localparam int unsigned AW    = $clog2(DMEM_DEPTH);
  localparam int unsigned KW    = $clog2(MAX_TAPS);
  localparam int unsigned RW    = $clog2(MAX_BLOCK);
  localparam int unsigned LW    = $clog2(MAX_BLOCK + 1);

  // input unit <-> data memory / controller
  logic [CNT_W-1:0]  wr_count, keep_from;
  logic              dm_we;
  logic [AW-1:0]     dm_waddr;
  logic [DATA_W-1:0] dm_wdata;
  logic              in_stall;
  // controller <-> memories, register file, MAC, output unit
  logic              dm_re, cm_re;
  logic [AW-1:0]     dm_raddr;
  logic [KW-1:0]     cm_raddr;
  logic [DATA_W-1:0] dm_rdata, cm_rdata, rf_rdata;
  logic              rf_we, rf_bypass;
  logic [RW-1:0]     rf_waddr, rf_raddr;
  logic              mac_clr, mac_issue, mac_coef_load, mac_busy;
  logic [RW-1:0]     mac_acc_idx, acc_rd_idx;
  logic [ACC_W-1:0]  acc_rd_data;
  logic [DATA_W-1:0] mul_coef_q, mul_data_q;
  logic              out_start, out_done, block_done;
  logic [LW-1:0]     out_len;
  ctrl_state_e       state;

  input_unit #(.DEPTH(DMEM_DEPTH), .DATA_W(DATA_W), .CNT_W(CNT_W)) u_in (
    .clk, .rst_n,
    .in_valid, .in_data, .in_ready,
    .keep_from, .wr_count, .init_done,
    .stall    (in_stall),
    .mem_we   (dm_we),
    .mem_waddr(dm_waddr),
    .mem_wdata(dm_wdata)
  );

  data_memory #(.DEPTH(DMEM_DEPTH), .DATA_W(DATA_W)) u_dmem (
    .clk,
    .we(dm_we), .waddr(dm_waddr), .wdata(dm_wdata),
    .re(dm_re), .raddr(dm_raddr), .rdata(dm_rdata)
  );

  coef_memory #(.DEPTH(MAX_TAPS), .DATA_W(DATA_W)) u_cmem (
    .clk,
    .we(coef_we), .waddr(coef_waddr), .wdata(coef_wdata),
    .re(cm_re), .raddr(cm_raddr), .rdata(cm_rdata)
  );

  block_controller #(
    .MAX_BLOCK(MAX_BLOCK), .MAX_TAPS(MAX_TAPS), .DMEM_DEPTH(DMEM_DEPTH), .CNT_W(CNT_W)
  ) u_ctrl (
    .clk, .rst_n,
    .num_taps, .block_len, .init_done, .wr_count, .keep_from,
    .dmem_re(dm_re), .dmem_raddr(dm_raddr),
    .cmem_re(cm_re), .cmem_raddr(cm_raddr),
    .rf_we, .rf_waddr, .rf_raddr,
    .mac_clr, .mac_issue, .mac_coef_load, .mac_acc_idx, .mac_busy,
    .out_start, .out_len, .out_done,
    .state, .block_done
  );

  data_register_file #(.NREG(MAX_BLOCK), .DATA_W(DATA_W)) u_rf (
    .clk, .rst_n,
    .we(rf_we), .waddr(rf_waddr), .wdata(dm_rdata),
    .raddr(rf_raddr), .rdata(rf_rdata),
    .bypass_hit(rf_bypass)
  );

  mac_unit #(.DATA_W(DATA_W), .NACC(MAX_BLOCK), .ACC_W(ACC_W)) u_mac (
    .clk, .rst_n,
    .clr      (mac_clr),
    .issue    (mac_issue),
    .coef_load(mac_coef_load),
    .coef     (cm_rdata),
    .data     (rf_rdata),
    .acc_idx  (mac_acc_idx),
    .rd_idx   (acc_rd_idx),
    .rd_data  (acc_rd_data),
    .busy     (mac_busy),
    .mul_coef_q,
    .mul_data_q
  );

  output_unit #(.NACC(MAX_BLOCK), .ACC_W(ACC_W)) u_out (
    .clk, .rst_n,
    .start  (out_start),
    .len    (out_len),
    .rd_idx (acc_rd_idx),
    .rd_data(acc_rd_data),
    .out_valid, .out_data, .out_last, .out_ready,
    .done   (out_done)
  );

endmodule
