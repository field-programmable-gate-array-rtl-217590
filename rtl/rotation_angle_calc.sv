// Rotation angle calculator: measures the plate's tilt from the binary
// output image of the plate localiser.
//
// Two columns of the plate, x0+c and x0+b-c with c = b/4, are searched from
// the top row down for the first pixel of value 1; their row numbers (from 1)
// are d1 and d2.  Instead of the angle itself the block returns
// alpha = 1/tan(theta) = (b - 2c) / (d2 - d1), which the coordinate
// correction divides by, and the crop height Va = tan(theta) * b/2.  The
// search addresses 640*(y0 + r - 1) + x0 + c and 640*(y0 + r - 1) + x0 + b - c
// and the alpha formula are the algorithm's.  Searching the two columns one
// after the other, taking d = a when a column holds no 1, the fixed-point
// alpha (ALPHA_FRAC fractional bits, rounded), the flat flag for d1 = d2 and
// limiting Va to (a-1)/2 are this design's choices.
//
// Interface: start (one cycle) with box begins; the binary frame memory is
// read through rd_en/rd_addr and answers on rd_data one cycle later.  One
// read is issued per cycle; a column costs d + 1 cycles.  done rises with
// angle valid two cycles after the second column is found, and stays high
// until the next start.
module rotation_angle_calc
  import anpr_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  np_box_t box,
  output logic    rd_en,
  output addr_t   rd_addr,
  input  logic    rd_data,
  output logic    done,
  output angle_t  angle,
  output scoord_t delta_d
);

  typedef enum logic [2:0] {S_IDLE, S_COL1, S_COL2, S_CALC, S_DONE} state_t;
  state_t state;

  coord_t a, b, c, col_x, y0;
  coord_t r_issue;           // row number being read (from 1)
  logic   pend;              // a read was issued last cycle
  coord_t r_pend;            // its row number
  coord_t d1, d2;

  assign rd_en   = (state == S_COL1 || state == S_COL2) && (r_issue <= a);
  coord_t row_y;
  assign row_y   = y0 + r_issue - 1'b1;
  assign rd_addr = addr_t'(IMG_W) * addr_t'(row_y) + addr_t'(col_x);

  // The found/exhausted condition of the column being searched.
  logic hit, miss;
  assign hit  = pend && rd_data;
  assign miss = pend && !rd_data && (r_pend == a);

  // alpha and Va from the two distances.
  scoord_t dd;
  alpha_t  alpha_c;
  scoord_t va_s;
  coord_t  va_c;
  logic    flat_c;
  always_comb begin
    logic [SC_W+ALPHA_FRAC-1:0] num, den, q;
    coord_t  span, b_half;
    scoord_t dd_abs;
    dd     = scoord_t'(d2) - scoord_t'(d1);
    flat_c = (dd == 0);
    span   = b - {c[COORD_W-2:0], 1'b0};            // b - 2c
    dd_abs = (dd < 0) ? -dd : dd;
    num    = (SC_W+ALPHA_FRAC)'(span) << ALPHA_FRAC;
    den    = (SC_W+ALPHA_FRAC)'(unsigned'(dd_abs));
    q      = flat_c ? '0 : (num + (den >> 1)) / den;
    alpha_c = (dd < 0) ? -alpha_t'(q) : alpha_t'(q);
    b_half = b >> 1;
    va_s   = div_alpha(scoord_t'(b_half), alpha_c, flat_c);
    va_c   = coord_t'(va_s < 0 ? -va_s : va_s);
    if (va_c > ((a - 1'b1) >> 1)) va_c = (a - 1'b1) >> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      a       <= '0;
      b       <= '0;
      c       <= '0;
      col_x   <= '0;
      y0      <= '0;
      r_issue <= '0;
      pend    <= 1'b0;
      r_pend  <= '0;
      d1      <= '0;
      d2      <= '0;
      done    <= 1'b0;
      angle   <= '0;
      delta_d <= '0;
    end else if (start) begin
      state   <= S_COL1;
      a       <= box.y1 - box.y0 + 1'b1;
      b       <= box.x1 - box.x0 + 1'b1;
      c       <= (box.x1 - box.x0 + 1'b1) >> 2;
      col_x   <= box.x0 + ((box.x1 - box.x0 + 1'b1) >> 2);
      y0      <= box.y0;
      r_issue <= coord_t'(1);
      pend    <= 1'b0;
      done    <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: ;
        S_COL1, S_COL2: begin
          if (hit || miss) begin
            // column finished: record d, go to the next one
            if (state == S_COL1) begin
              d1      <= r_pend;
              state   <= S_COL2;
              col_x   <= col_x + b - (c << 1);   // x0 + b - c
              r_issue <= coord_t'(1);
            end else begin
              d2    <= r_pend;
              state <= S_CALC;
            end
            pend <= 1'b0;
          end else begin
            pend    <= rd_en;
            r_pend  <= r_issue;
            r_issue <= r_issue + 1'b1;
          end
        end
        S_CALC: begin
          angle   <= '{flat: flat_c, alpha: alpha_c, va: va_c};
          delta_d <= dd;
          done    <= 1'b1;
          state   <= S_DONE;
        end
        S_DONE: ;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
