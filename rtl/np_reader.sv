// NP reader: turns the plate's corner coordinates into the stream of
// greyscale-memory addresses that feeds the mean filter.
//
// The plate region is read column by column, left to right, one pixel per
// clock, at address 640*y + x.  So that every plate pixel can be the centre
// of an 8x8 window, the scan is widened by the window margin: columns x0-3
// to x1+4 and rows y0-3 to y1+4, coordinates clamped to the 640x480 image
// (the border pixel is repeated).  The widening and the clamp are this
// design's choice; the addressing rule and scan order are the algorithm's.
//
// Interface: a one-cycle start pulse latches the box and begins the scan;
// rd_en/rd_addr go to the external greyscale memory, whose data arrives
// MEM_LAT cycles later.  The side-band outputs (px_valid, px_row, px_col,
// px_last) are delayed by MEM_LAT so that they line up with that data.
// px_row/px_col count from 0 at the top-left corner of the widened scan.
// A scan takes (a+7)*(b+7) cycles for an a x b plate; busy is high during it.
module np_reader
  import anpr_pkg::*;
#(
  parameter int unsigned MEM_LAT = 1,
  parameter int unsigned MARGIN_LO = WIN/2 - 1,   // 3 pixels before the centre
  parameter int unsigned MARGIN_HI = WIN/2        // 4 pixels after it
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  np_box_t box,
  output logic    busy,
  // external greyscale memory
  output logic    rd_en,
  output addr_t   rd_addr,
  // side-band aligned with the returned pixel
  output logic    px_valid,
  output coord_t  px_row,
  output coord_t  px_col,
  output logic    px_last
);

  coord_t scan_h, scan_w;           // widened height and width
  coord_t row, col;
  scoord_t org_x, org_y;            // top-left corner of the widened scan

  // Clamped image coordinates of the current scan position.
  scoord_t sx, sy;
  coord_t  cx, cy;
  always_comb begin
    sx = org_x + scoord_t'(col);
    sy = org_y + scoord_t'(row);
    cx = (sx < 0) ? '0 : (sx > scoord_t'(IMG_W-1)) ? coord_t'(IMG_W-1) : coord_t'(sx);
    cy = (sy < 0) ? '0 : (sy > scoord_t'(IMG_H-1)) ? coord_t'(IMG_H-1) : coord_t'(sy);
  end

  logic last_pos;
  assign last_pos = (row == scan_h - 1'b1) && (col == scan_w - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      row    <= '0;
      col    <= '0;
      scan_h <= '0;
      scan_w <= '0;
      org_x  <= '0;
      org_y  <= '0;
    end else if (start) begin
      busy   <= 1'b1;
      row    <= '0;
      col    <= '0;
      scan_h <= box.y1 - box.y0 + coord_t'(1 + MARGIN_LO + MARGIN_HI);
      scan_w <= box.x1 - box.x0 + coord_t'(1 + MARGIN_LO + MARGIN_HI);
      org_x  <= scoord_t'(box.x0) - scoord_t'(MARGIN_LO);
      org_y  <= scoord_t'(box.y0) - scoord_t'(MARGIN_LO);
    end else if (busy) begin
      if (last_pos) begin
        busy <= 1'b0;
      end else if (row == scan_h - 1'b1) begin
        row <= '0;
        col <= col + 1'b1;
      end else begin
        row <= row + 1'b1;
      end
    end
  end

  assign rd_en   = busy;
  assign rd_addr = addr_t'(IMG_W) * addr_t'(cy) + addr_t'(cx);

  // Delay the side-band by the memory latency.
  logic   v_d [MEM_LAT];
  logic   l_d [MEM_LAT];
  coord_t r_d [MEM_LAT];
  coord_t c_d [MEM_LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MEM_LAT; i++) begin
        v_d[i] <= 1'b0;
        l_d[i] <= 1'b0;
        r_d[i] <= '0;
        c_d[i] <= '0;
      end
    end else begin
      v_d[0] <= busy;
      l_d[0] <= busy && last_pos;
      r_d[0] <= row;
      c_d[0] <= col;
      for (int i = 1; i < MEM_LAT; i++) begin
        v_d[i] <= v_d[i-1];
        l_d[i] <= l_d[i-1];
        r_d[i] <= r_d[i-1];
        c_d[i] <= c_d[i-1];
      end
    end
  end

  assign px_valid = v_d[MEM_LAT-1];
  assign px_last  = l_d[MEM_LAT-1];
  assign px_row   = r_d[MEM_LAT-1];
  assign px_col   = c_d[MEM_LAT-1];

endmodule
