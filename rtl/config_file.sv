// config_file: configuration registers of a PE, written by the host after the
// static layout preprocessing.
//
// Register map (addr[9:8] selects the bank, addr[7:0] the register):
//   bank 0:  0..3  mode of sub-array position p (macam_pkg::sub_mode_e)
//            4..7  dense position p: output row id of its column 0
//            8..11 dense position p: input-buffer index of its row 0
//            12    global vector index held in input-buffer entry 0
//            13    number of input-buffer entries searched by the gather
//   bank 1:  j     output row id of the first matrix row in CAM region j
//   bank 2:  j     number of index entries stored in CAM region j (0 = unused)
// The mode of a position applies to that region in all arrays of the PE,
// because a dense block is bit-sliced over all of them. cam_pos / spmac_pos
// report the (lowest) position configured as CAM / as sparse MAC, and
// sparse_on whether both exist. Writes are synchronous, reads combinational.
// Holding the mode configuration follows the accelerator's description; the
// register map is this design's.
module config_file
#(
  parameter int NUM_SUB    = macam_pkg::NUM_SUB,
  parameter int NUM_ARRAYS = macam_pkg::NUM_ARRAYS,
  parameter int SUB_DIM    = macam_pkg::SUB_DIM,
  parameter int ROW_W      = macam_pkg::ROW_W,
  localparam int PW = $clog2(NUM_SUB),
  localparam int LW = $clog2(SUB_DIM + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [9:0]       addr,
  input  logic [31:0]      wdata,
  output macam_pkg::sub_mode_e        mode      [NUM_SUB],
  output logic [ROW_W-1:0] row_base  [NUM_SUB],
  output logic [15:0]      vcol      [NUM_SUB],
  output logic [ROW_W-1:0] vec_base,
  output logic [15:0]      nvec,
  output logic [ROW_W-1:0] sbase     [NUM_ARRAYS],
  output logic [LW-1:0]    nent      [NUM_ARRAYS],
  output logic [PW-1:0]    cam_pos,
  output logic [PW-1:0]    spmac_pos,
  output logic             sparse_on
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NUM_SUB; p++) begin
        mode[p]     <= macam_pkg::SUB_IDLE;
        row_base[p] <= '0;
        vcol[p]     <= '0;
      end
      vec_base <= '0;
      nvec     <= '0;
      for (int j = 0; j < NUM_ARRAYS; j++) begin
        sbase[j] <= '0;
        nent[j]  <= '0;
      end
    end else if (we) begin
      case (addr[9:8])
        2'd0: begin
          for (int p = 0; p < NUM_SUB; p++) begin
            if (int'(addr[7:0]) == p)             mode[p]     <= macam_pkg::sub_mode_e'(wdata[1:0]);
            if (int'(addr[7:0]) == 4 + p)         row_base[p] <= ROW_W'(wdata);
            if (int'(addr[7:0]) == 8 + p)         vcol[p]     <= wdata[15:0];
          end
          if (addr[7:0] == 8'd12) vec_base <= ROW_W'(wdata);
          if (addr[7:0] == 8'd13) nvec     <= wdata[15:0];
        end
        2'd1: if (int'(addr[7:0]) < NUM_ARRAYS) sbase[addr[7:0]] <= ROW_W'(wdata);
        2'd2: if (int'(addr[7:0]) < NUM_ARRAYS) nent[addr[7:0]]  <= LW'(wdata);
        default: ;
      endcase
    end
  end

  always_comb begin
    logic has_cam, has_mac;
    has_cam   = 1'b0;
    has_mac   = 1'b0;
    cam_pos   = '0;
    spmac_pos = '0;
    for (int p = NUM_SUB - 1; p >= 0; p--) begin
      if (mode[p] == macam_pkg::SUB_CAM)   begin cam_pos   = PW'(p); has_cam = 1'b1; end
      if (mode[p] == macam_pkg::SUB_SPMAC) begin spmac_pos = PW'(p); has_mac = 1'b1; end
    end
    sparse_on = has_cam && has_mac;
  end

endmodule
