// Control unit of the block-processing FIR: sequences one output block of L
// outputs y(m) .. y(m+L-1) through the single multiplier.
//
// For an N-tap filter with coefficients h(0)..h(N-1) the block is built as
// follows. PRELOAD fetches samples x(m-N+1) .. x(m-N+L) into data registers
// R_0 .. R_{L-1}; together with the first fetch of h(N-1) this is the only
// time L samples are read. MAC then works through the coefficients
// k = N-1 down to 0. For each coefficient it issues L products on L
// consecutive cycles: product j multiplies h(k) by the register holding
// x(m+j-k) and goes to accumulator ACC_j. The registers are used circularly:
// with p the register holding the oldest sample of the window, product j reads
// R_{(p+j) mod L}. On the last product of a coefficient the controller reads
// the next coefficient and one new sample, x(m-N+1+L+i) for the i-th step,
// which is written over the oldest register R_p, and p advances by one. After
// all N coefficients, DRAIN waits for the last product to reach its
// accumulator and the output unit is started; when it has sent the block, m
// advances by L and the next block can begin.
//
// Memory traffic per block is N coefficient reads and N-1+L sample reads,
// i.e. N/L and 1+(N-1)/L per output.
//
// Interface: num_taps (N) and block_len (L) are sampled when a block starts
// and must stay within 1..MAX_TAPS and 1..MAX_BLOCK. wr_count is the number of
// samples written so far; a block starts once the L samples x(m)..x(m+L-1)
// have arrived. keep_from = m - (MAX_TAPS-1) tells the input unit which
// samples must not be overwritten. Sample memory and coefficient memory have a
// one-cycle read latency; the sample read in one cycle is written into the
// register file in the next (rf_we/rf_waddr).
// Timing, with input available and the output stream ready:
// 1 (IDLE) + L (PRELOAD) + N*L (MAC) + 2 (DRAIN) + L + 1 (output) cycles per
// block, one multiplication per cycle during MAC.
// The fetch order, the register rotation and the accumulator mapping follow
// the scheme; the phase structure and its cycle timing are this design's
// choice.
module block_controller
  import block_fir_pkg::*;
#(
  parameter int unsigned MAX_BLOCK  = 16,
  parameter int unsigned MAX_TAPS   = 128,
  parameter int unsigned DMEM_DEPTH = 256,
  parameter int unsigned CNT_W      = 32
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [$clog2(MAX_TAPS+1)-1:0]  num_taps,
  input  logic [$clog2(MAX_BLOCK+1)-1:0] block_len,
  input  logic                           init_done,
  input  logic [CNT_W-1:0]               wr_count,
  output logic [CNT_W-1:0]               keep_from,
  // sample memory read port
  output logic                           dmem_re,
  output logic [$clog2(DMEM_DEPTH)-1:0]  dmem_raddr,
  // coefficient memory read port
  output logic                           cmem_re,
  output logic [$clog2(MAX_TAPS)-1:0]    cmem_raddr,
  // data register file
  output logic                           rf_we,
  output logic [$clog2(MAX_BLOCK)-1:0]   rf_waddr,
  output logic [$clog2(MAX_BLOCK)-1:0]   rf_raddr,
  // MAC unit
  output logic                           mac_clr,
  output logic                           mac_issue,
  output logic                           mac_coef_load,
  output logic [$clog2(MAX_BLOCK)-1:0]   mac_acc_idx,
  input  logic                           mac_busy,
  // output unit
  output logic                           out_start,
  output logic [$clog2(MAX_BLOCK+1)-1:0] out_len,
  input  logic                           out_done,
  // status
  output ctrl_state_e                    state,
  output logic                           block_done
);
  localparam int unsigned LW = $clog2(MAX_BLOCK + 1);
  localparam int unsigned NW = $clog2(MAX_TAPS + 1);
  localparam int unsigned RW = $clog2(MAX_BLOCK);
  localparam int unsigned AW = $clog2(DMEM_DEPTH);
  localparam int unsigned KW = $clog2(MAX_TAPS);

  ctrl_state_e      state_q;
  logic [CNT_W-1:0] m_q;       // number of the first output of the block
  logic [CNT_W-1:0] rd_ptr_q;  // number of the next sample to fetch
  logic [NW-1:0]    n_q;       // taps of this block
  logic [LW-1:0]    l_q;       // block size of this block
  logic [KW-1:0]    k_q;       // coefficient being applied
  logic [LW-1:0]    j_q;       // product within the coefficient step
  logic [LW-1:0]    p_q;       // register holding the oldest window sample
  logic [LW-1:0]    pre_q;     // preload counter
  logic             rf_we_q;
  logic [RW-1:0]    rf_waddr_q;
  logic [CNT_W-1:0] avail;
  logic [LW:0]      rsel;

  assign state      = state_q;
  assign keep_from  = m_q - CNT_W'(MAX_TAPS - 1);
  assign avail      = wr_count - m_q;
  assign rf_we      = rf_we_q;
  assign rf_waddr   = rf_waddr_q;
  assign out_len    = l_q;

  // Circular register selection: R_{(p+j) mod L}.
  always_comb begin
    rsel = {1'b0, p_q} + {1'b0, j_q};
    if (rsel >= {1'b0, l_q}) rsel = rsel - {1'b0, l_q};
  end

  always_comb begin
    dmem_re       = 1'b0;
    dmem_raddr    = rd_ptr_q[AW-1:0];
    cmem_re       = 1'b0;
    cmem_raddr    = k_q;
    rf_raddr      = rsel[RW-1:0];
    mac_clr       = 1'b0;
    mac_issue     = 1'b0;
    mac_coef_load = 1'b0;
    mac_acc_idx   = j_q[RW-1:0];
    out_start     = 1'b0;
    block_done    = 1'b0;
    unique case (state_q)
      ST_IDLE: begin
        mac_clr = 1'b1;
      end
      ST_PRELOAD: begin
        dmem_re = 1'b1;
        if (pre_q == l_q - 1'b1) begin
          cmem_re    = 1'b1;
          cmem_raddr = KW'(n_q - 1'b1);
        end
      end
      ST_MAC: begin
        mac_issue     = 1'b1;
        mac_coef_load = (j_q == '0);
        if (j_q == l_q - 1'b1 && k_q != '0) begin
          cmem_re    = 1'b1;
          cmem_raddr = k_q - 1'b1;
          dmem_re    = 1'b1;
        end
      end
      ST_DRAIN: begin
        out_start = !mac_busy;
      end
      ST_OUT: begin
        block_done = out_done;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= ST_IDLE;
      m_q        <= '0;
      rd_ptr_q   <= '0;
      n_q        <= NW'(1);
      l_q        <= LW'(1);
      k_q        <= '0;
      j_q        <= '0;
      p_q        <= '0;
      pre_q      <= '0;
      rf_we_q    <= 1'b0;
      rf_waddr_q <= '0;
    end else begin
      rf_we_q <= 1'b0;
      unique case (state_q)
        ST_IDLE: begin
          if (init_done && avail >= CNT_W'(block_len)) begin
            n_q      <= num_taps;
            l_q      <= block_len;
            rd_ptr_q <= m_q - CNT_W'(num_taps) + 1'b1;
            pre_q    <= '0;
            state_q  <= ST_PRELOAD;
          end
        end
        ST_PRELOAD: begin
          rd_ptr_q   <= rd_ptr_q + 1'b1;
          rf_we_q    <= 1'b1;
          rf_waddr_q <= pre_q[RW-1:0];
          pre_q      <= pre_q + 1'b1;
          if (pre_q == l_q - 1'b1) begin
            k_q     <= KW'(n_q - 1'b1);
            j_q     <= '0;
            p_q     <= '0;
            state_q <= ST_MAC;
          end
        end
        ST_MAC: begin
          if (j_q == l_q - 1'b1) begin
            j_q <= '0;
            if (k_q == '0) begin
              state_q <= ST_DRAIN;
            end else begin
              k_q        <= k_q - 1'b1;
              rd_ptr_q   <= rd_ptr_q + 1'b1;
              rf_we_q    <= 1'b1;
              rf_waddr_q <= p_q[RW-1:0];
              p_q        <= (p_q == l_q - 1'b1) ? '0 : p_q + 1'b1;
            end
          end else begin
            j_q <= j_q + 1'b1;
          end
        end
        ST_DRAIN: begin
          if (!mac_busy) state_q <= ST_OUT;
        end
        ST_OUT: begin
          if (out_done) begin
            m_q     <= m_q + CNT_W'(l_q);
            state_q <= ST_IDLE;
          end
        end
        default: state_q <= ST_IDLE;
      endcase
    end
  end

  // Configuration must be legal when a block starts.
  always_ff @(posedge clk) begin
    if (rst_n && state_q == ST_IDLE && init_done && avail >= CNT_W'(block_len)) begin
      assert (num_taps >= 1 && num_taps <= NW'(MAX_TAPS)) else $error("num_taps out of range");
      assert (block_len >= 1 && block_len <= LW'(MAX_BLOCK)) else $error("block_len out of range");
    end
  end

  initial begin
    assert (DMEM_DEPTH >= MAX_TAPS - 1 + MAX_BLOCK)
      else $error("sample memory too small for the longest filter and block");
  end
endmodule
