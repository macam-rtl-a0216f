// macam_controller: sequencer of one PE.
//
// After start it runs the working stages of the accelerator in this order:
//  1. Gather (only if a CAM and a sparse-MAC position are configured): a column
//     counter walks the input buffer; each cycle the element's global index is
//     searched in the CAM region of every array, and matching rows latch the
//     element (the vector operand of that stored entry).
//  2. Dense passes: for every position configured dense, one setup cycle
//     (delays from the delay unit into the delay registers), STEPS bit-serial
//     steps, then the column results go to the output buffer. Idle positions
//     are skipped.
//  3. Sparse passes: for every CAM region j with entries, a row counter walks
//     the MCSR rows. The row count at the first entry of a row (read from the
//     delay register of the CAM region) gives the rows of the match buffer to
//     activate. A row count of 0 marks a padding entry of an empty row. At most
//     SPMAX entries are activated per pass (the range of the sparse ADC); a
//     longer row takes several passes whose partials the merge queue adds.
//     Each pass: range load, setup, STEPS steps, result to the output buffer.
//     Results enter the merge queue as soon as they are produced, so merging
//     overlaps the sparse computation.
//  4. Flush of the merge queue, then done pulses for one cycle.
// The stage order and the row-count traversal follow the accelerator's
// description of its working approach; the cycle-level sequencing, the pass
// splitting and the padding rule are this design's. ev_* pulse once per event.
module macam_controller
#(
  parameter int NUM_SUB    = macam_pkg::NUM_SUB,
  parameter int NUM_ARRAYS = macam_pkg::NUM_ARRAYS,
  parameter int SUB_DIM    = macam_pkg::SUB_DIM,
  parameter int STEPS      = macam_pkg::XW + macam_pkg::DMAX,
  parameter int SPMAX      = (1 << macam_pkg::SPARSE_ADC) - 1,
  parameter int ROW_W      = macam_pkg::ROW_W,
  localparam int PW = $clog2(NUM_SUB),
  localparam int AW = $clog2(NUM_ARRAYS),
  localparam int RW = $clog2(SUB_DIM),
  localparam int LW = $clog2(SUB_DIM + 1),
  localparam int TW = $clog2(STEPS + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  // configuration
  input  macam_pkg::sub_mode_e        mode [NUM_SUB],
  input  logic [15:0]      nvec,
  input  logic [LW-1:0]    nent [NUM_ARRAYS],
  input  logic             sparse_on,
  // status
  input  logic [LW-1:0]    row_cnt,      // row count at (cur_arr, cur_row)
  input  logic             ob_empty,
  input  logic             mq_empty,
  // control
  output macam_pkg::stage_e           stage,
  output logic             g_clr,
  output logic             g_en,
  output logic [15:0]      g_addr,
  output logic [PW-1:0]    cur_pos,
  output logic [AW-1:0]    cur_arr,
  output logic [RW-1:0]    cur_row,
  output logic [LW-1:0]    chunk_len,
  output logic [ROW_W-1:0] row_off,
  output logic             mb_ld_range,
  output logic [LW-1:0]    rng_len,
  output logic             setup,
  output logic             run,
  output logic             first,
  output logic [TW-1:0]    step,
  output logic             ob_load,
  output logic             mq_flush,
  output logic             busy,
  output logic             done,
  output logic             ev_dense_pass,
  output logic             ev_sparse_pass,
  output logic             ev_skip,
  output logic             ev_split,
  output logic             ev_pad
);

  logic [LW-1:0] rem;        // entries of the current matrix row still to do
  logic          inrow;
  int            posi;       // position counter, may reach NUM_SUB
  int            arri;       // array counter, may reach NUM_ARRAYS
  int            rowi;       // entry counter, may reach SUB_DIM

  assign cur_pos = PW'(posi);
  assign cur_arr = AW'(arri);
  assign cur_row = RW'(rowi);
  assign busy    = (stage != macam_pkg::ST_IDLE);

  // combinational controls
  always_comb begin
    g_en        = (stage == macam_pkg::ST_GATHER);
    setup       = (stage == macam_pkg::ST_DSETUP) || (stage == macam_pkg::ST_SSETUP);
    run         = (stage == macam_pkg::ST_DRUN)   || (stage == macam_pkg::ST_SRUN);
    first       = run && (step == '0);
    ob_load     = ((stage == macam_pkg::ST_DOUT) || (stage == macam_pkg::ST_SOUT)) && ob_empty;
    mq_flush    = (stage == macam_pkg::ST_FLUSH) && ob_empty;
    done        = (stage == macam_pkg::ST_DONE);
    // the row range goes into the match buffer while leaving macam_pkg::ST_SROW
    rng_len     = min_len(inrow ? rem : row_cnt);
    mb_ld_range = (stage == macam_pkg::ST_SROW) && (rowi < int'(nent[arri])) &&
                  (inrow || row_cnt != '0);
  end

  function automatic logic [LW-1:0] min_len(input logic [LW-1:0] a);
    return (int'(a) > SPMAX) ? LW'(SPMAX) : a;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage          <= macam_pkg::ST_IDLE;
      g_clr          <= 1'b0;
      g_addr         <= '0;
      posi           <= 0;
      arri           <= 0;
      rowi           <= 0;
      rem            <= '0;
      inrow          <= 1'b0;
      chunk_len      <= '0;
      row_off        <= '0;
      step           <= '0;
      ev_dense_pass  <= 1'b0;
      ev_sparse_pass <= 1'b0;
      ev_skip        <= 1'b0;
      ev_split       <= 1'b0;
      ev_pad         <= 1'b0;
    end else begin
      g_clr          <= 1'b0;
      ev_dense_pass  <= 1'b0;
      ev_sparse_pass <= 1'b0;
      ev_skip        <= 1'b0;
      ev_split       <= 1'b0;
      ev_pad         <= 1'b0;
      unique case (stage)
        macam_pkg::ST_IDLE: if (start) begin
          posi   <= 0;
          g_addr <= '0;
          if (sparse_on && nvec != '0) begin
            g_clr <= 1'b1;
            stage <= macam_pkg::ST_GATHER;
          end else begin
            stage <= macam_pkg::ST_DSEL;
          end
        end
        macam_pkg::ST_GATHER: begin
          // g_clr acts in the first cycle here, before the first search writes
          if (g_clr) begin
            // hold the address for one cycle so that the clear lands first
          end else if (g_addr == nvec - 16'd1) begin
            stage <= macam_pkg::ST_DSEL;
          end else begin
            g_addr <= g_addr + 16'd1;
          end
        end
        macam_pkg::ST_DSEL: begin
          if (posi >= NUM_SUB) begin
            arri  <= 0;
            stage <= macam_pkg::ST_SSEL;
          end else if (mode[posi] == macam_pkg::SUB_DENSE) begin
            stage <= macam_pkg::ST_DSETUP;
          end else begin
            if (mode[posi] == macam_pkg::SUB_IDLE) ev_skip <= 1'b1;
            posi <= posi + 1;
          end
        end
        macam_pkg::ST_DSETUP: begin
          step  <= '0;
          stage <= macam_pkg::ST_DRUN;
        end
        macam_pkg::ST_DRUN: begin
          if (int'(step) == STEPS - 1) stage <= macam_pkg::ST_DOUT;
          else                         step  <= step + 1'b1;
        end
        macam_pkg::ST_DOUT: if (ob_empty) begin
          ev_dense_pass <= 1'b1;
          posi  <= posi + 1;
          stage <= macam_pkg::ST_DSEL;
        end
        macam_pkg::ST_SSEL: begin
          if (!sparse_on || arri >= NUM_ARRAYS) begin
            stage <= macam_pkg::ST_FLUSH;
          end else if (nent[arri] == '0) begin
            arri <= arri + 1;
          end else begin
            rowi    <= 0;
            row_off <= '0;
            inrow   <= 1'b0;
            stage   <= macam_pkg::ST_SROW;
          end
        end
        macam_pkg::ST_SROW: begin
          if (rowi >= int'(nent[arri])) begin
            arri  <= arri + 1;
            stage <= macam_pkg::ST_SSEL;
          end else if (!inrow && row_cnt == '0) begin
            ev_pad  <= 1'b1;
            rowi    <= rowi + 1;
            row_off <= row_off + 1'b1;
          end else begin
            logic [LW-1:0] r;
            r = inrow ? rem : row_cnt;
            if (inrow) ev_split <= 1'b1;
            chunk_len   <= min_len(r);
            rem         <= r;
            inrow       <= 1'b1;
            stage       <= macam_pkg::ST_SSETUP;
          end
        end
        macam_pkg::ST_SSETUP: begin
          step  <= '0;
          stage <= macam_pkg::ST_SRUN;
        end
        macam_pkg::ST_SRUN: begin
          if (int'(step) == STEPS - 1) stage <= macam_pkg::ST_SOUT;
          else                         step  <= step + 1'b1;
        end
        macam_pkg::ST_SOUT: if (ob_empty) begin
          ev_sparse_pass <= 1'b1;
          rowi <= rowi + int'(chunk_len);
          if (rem == chunk_len) begin
            inrow   <= 1'b0;
            row_off <= row_off + 1'b1;
          end
          rem   <= rem - chunk_len;
          stage <= macam_pkg::ST_SROW;
        end
        macam_pkg::ST_FLUSH: if (ob_empty && mq_empty) stage <= macam_pkg::ST_DONE;
        macam_pkg::ST_DONE:  stage <= macam_pkg::ST_IDLE;
        default:  stage <= macam_pkg::ST_IDLE;
      endcase
    end
  end

endmodule
