// Adjustment module: horizontal rotation, cropping and vertical slant
// correction of the binarised plate.
//
// The rotation angle calculator measures alpha = 1/tan(theta) and the crop
// height Va from the localiser's binary frame.  A scan counter then walks the
// output plate column by column, x1 = 0..b-1 and y1 = Va..a-1-Va (the crop
// removes Va rows at top and bottom), feeds each (x1, y1) through the
// coordinates correction pipeline and lets the pixel reader fetch the source
// pixel from the binarisation module's 256-entry circular buffer.  The three
// blocks and their order are the algorithm's.
//
// The two modules run concurrently: the adjustment follows the binarisation
// LAG pixels behind, so that a source pixel up to LAG positions ahead of the
// scan position (in column-major order x*a + y) is already written and one
// up to 256 - LAG - 8 behind it is not yet overwritten.  The scan stalls
// while fewer than x1*a + y1 + LAG + 1 pixels have been binarised (or until
// the binarisation is done).  This flow control and the LAG value are this
// design's choice; sources further away than the buffer allows read
// whatever the buffer holds.
//
// Interface: start (one cycle) with box.  nb_rd_* reads the binary frame
// memory (one cycle latency); bin_count/bin_done/bin_rd_* connect to the
// binarisation module.  The adjusted plate, b columns of a - 2Va pixels,
// leaves on out_valid/out_pix in column-major order and in the two
// segmentation RAMs; done rises after its last pixel.  stall_cycles counts
// cycles in which the scan waited for the binarisation.
module adjustment
  import anpr_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 256,
  parameter int unsigned LAG       = BUF_DEPTH / 2,
  parameter int unsigned VS_DEPTH  = 256,
  parameter int unsigned HS_DEPTH  = 2048,
  localparam int unsigned BAW = $clog2(BUF_DEPTH),
  localparam int unsigned VAW = $clog2(VS_DEPTH),
  localparam int unsigned HAW = $clog2(HS_DEPTH)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  np_box_t           box,
  // binary frame memory of the localiser
  output logic              nb_rd_en,
  output addr_t             nb_rd_addr,
  input  logic              nb_rd_data,
  // binarisation module
  input  logic [ADDR_W-1:0] bin_count,
  input  logic              bin_done,
  output logic [BAW-1:0]    bin_rd_addr,
  input  logic              bin_rd_data,
  // adjusted plate
  output logic              angle_done,
  output angle_t            angle,
  output scoord_t           delta_d,
  output logic              out_valid,
  output logic              out_pix,
  output logic [ADDR_W-1:0] out_count,
  output logic              done,
  output logic [ADDR_W-1:0] stall_cycles,
  input  logic [VAW-1:0]    vs_rd_addr,
  output logic              vs_rd_data,
  input  logic [HAW-1:0]    hs_rd_addr,
  output logic              hs_rd_data
);

  rotation_angle_calc u_angle (
    .clk, .rst_n, .start, .box,
    .rd_en   (nb_rd_en),
    .rd_addr (nb_rd_addr),
    .rd_data (nb_rd_data),
    .done    (angle_done),
    .angle   (angle),
    .delta_d (delta_d)
  );

  // ---------------------------------------------------------------- scan
  typedef enum logic [1:0] {A_IDLE, A_WAIT, A_SCAN, A_DRAIN} astate_t;
  astate_t state;

  coord_t a, b, y_lo, y_hi, a_minus_va;
  coord_t sx, sy;
  logic [ADDR_W-1:0] scan_idx;     // sx*a + sy
  logic issue, last_pos;

  assign last_pos = (sx == b - 1'b1) && (sy == y_hi);
  assign issue    = (state == A_SCAN) &&
                    (bin_done || (bin_count > scan_idx + ADDR_W'(LAG)));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= A_IDLE;
      a            <= '0;
      b            <= '0;
      y_lo         <= '0;
      y_hi         <= '0;
      a_minus_va   <= '0;
      sx           <= '0;
      sy           <= '0;
      scan_idx     <= '0;
      stall_cycles <= '0;
    end else if (start) begin
      state        <= A_WAIT;
      a            <= box.y1 - box.y0 + 1'b1;
      b            <= box.x1 - box.x0 + 1'b1;
      stall_cycles <= '0;
    end else begin
      unique case (state)
        A_IDLE: ;
        A_WAIT: if (angle_done) begin
          y_lo       <= angle.va;
          y_hi       <= a - 1'b1 - angle.va;
          a_minus_va <= a - angle.va;
          sx         <= '0;
          sy         <= angle.va;
          scan_idx   <= ADDR_W'(angle.va);
          state      <= A_SCAN;
        end
        A_SCAN: begin
          if (issue) begin
            if (last_pos) begin
              state <= A_DRAIN;
            end else if (sy == y_hi) begin
              sy       <= y_lo;
              sx       <= sx + 1'b1;
              scan_idx <= scan_idx + ADDR_W'(y_lo) + ADDR_W'(a - y_hi);
            end else begin
              sy       <= sy + 1'b1;
              scan_idx <= scan_idx + 1'b1;
            end
          end else begin
            stall_cycles <= stall_cycles + 1'b1;
          end
        end
        A_DRAIN: if (done) state <= A_IDLE;
        default: state <= A_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- datapath
  logic    cc_valid, cc_last;
  scoord_t cc_x2, cc_y2;

  coord_correction u_cc (
    .clk, .rst_n,
    .a          (a),
    .b          (b),
    .a_minus_va (a_minus_va),
    .angle      (angle),
    .in_valid   (issue),
    .x1         (scoord_t'(sx)),
    .y1         (scoord_t'(sy)),
    .in_last    (last_pos),
    .out_valid  (cc_valid),
    .x2         (cc_x2),
    .y2         (cc_y2),
    .out_last   (cc_last)
  );

  pixel_reader #(.BUF_DEPTH(BUF_DEPTH), .VS_DEPTH(VS_DEPTH), .HS_DEPTH(HS_DEPTH)) u_reader (
    .clk, .rst_n, .start,
    .a           (a),
    .b           (b),
    .in_valid    (cc_valid),
    .x2          (cc_x2),
    .y2          (cc_y2),
    .in_last     (cc_last),
    .bin_rd_addr (bin_rd_addr),
    .bin_rd_data (bin_rd_data),
    .out_valid   (out_valid),
    .out_pix     (out_pix),
    .out_count   (out_count),
    .done        (done),
    .vs_rd_addr  (vs_rd_addr),
    .vs_rd_data  (vs_rd_data),
    .hs_rd_addr  (hs_rd_addr),
    .hs_rd_data  (hs_rd_data)
  );

endmodule
