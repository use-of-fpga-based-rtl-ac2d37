// cm_control: control unit of the characteristic map.
//
// Two jobs:
//  * load: copies the x-axis nodes (map RAM addresses 0..NX-1) into the x-axis
//    fast RAM and the y-axis nodes (NX..NX+NY-1) into the y-axis fast RAM, one
//    word per clock; ready rises when the copy is complete.
//  * lookup: on start (while ready) both bisection searches are started with x
//    and y and run in parallel; then the four z nodes around the found cell are
//    read from the map RAM (z(ix,iy) at NX+NY+iy*NX+ix, one read per clock) and
//    the interpolation is started with the point, the interval ends (read from
//    the fast RAMs) and the four nodes. done pulses with z when it finishes.
// A lookup takes a constant number of clocks for a given method: the search time
// log2(max(NX,NY)) for the searches, 7 for the node reads and hand-over, plus
// the interpolation time (7 or 16); 19 or 28 clocks for a 32 x 32 map.
// The search point, the axis words being copied and the interval ends pass
// through this unit as plain wires: the searches latch the point at start, and
// the fast RAMs keep the ends steady until the interpolation has finished, so
// no register copy is needed here.
// The division of work between control unit, fast RAMs, searches and
// interpolation follows the CEL; the sequencing details are this design's.
module cm_control
  import cel_pkg::*;
#(
  parameter int unsigned NX  = 32,
  parameter int unsigned NY  = 32,
  parameter int unsigned AW  = $clog2(NX + NY + NX * NY),
  parameter int unsigned XAW = $clog2(NX),
  parameter int unsigned YAW = $clog2(NY)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           load,
  input  logic           start,
  input  f32_t           x,
  input  f32_t           y,
  output logic           ready,
  output logic           done,
  output f32_t           z,
  // map RAM read port
  output logic [AW-1:0]  ram_raddr,
  input  f32_t           ram_rdata,
  // x-axis fast RAM
  output logic           xr_we,
  output logic [XAW-1:0] xr_waddr,
  output f32_t           xr_wdata,
  output logic [XAW-1:0] xr_addr_lo,
  input  f32_t           xr_lo,
  output logic [XAW-1:0] xr_addr_hi,
  input  f32_t           xr_hi,
  // y-axis fast RAM
  output logic           yr_we,
  output logic [YAW-1:0] yr_waddr,
  output f32_t           yr_wdata,
  output logic [YAW-1:0] yr_addr_lo,
  input  f32_t           yr_lo,
  output logic [YAW-1:0] yr_addr_hi,
  input  f32_t           yr_hi,
  // searches
  output logic           srch_start,
  output f32_t           srch_x,
  output f32_t           srch_y,
  input  logic           xs_done,
  input  logic [XAW-1:0] xs_index,
  input  logic           ys_done,
  input  logic [YAW-1:0] ys_index,
  // interpolation
  output logic           ip_start,
  output f32_t           ip_x,
  output f32_t           ip_x0,
  output f32_t           ip_x1,
  output f32_t           ip_y,
  output f32_t           ip_y0,
  output f32_t           ip_y1,
  output f32_t           ip_z00,
  output f32_t           ip_z10,
  output f32_t           ip_z01,
  output f32_t           ip_z11,
  input  logic           ip_done,
  input  f32_t           ip_z
);
  typedef enum logic [2:0] {S_EMPTY, S_LOAD, S_READY, S_SEARCH, S_FETCH, S_INTERP} state_e;

  localparam int unsigned NAX = NX + NY;
  localparam int unsigned CW  = $clog2(NAX + 1);

  state_e         state;
  logic [CW-1:0]  cnt;
  logic [CW-1:0]  wa;       // address copied this clock (cnt - 1)
  logic           xd, yd;
  logic [XAW-1:0] ix;
  logic [YAW-1:0] iy;
  f32_t           x_q, y_q;
  f32_t           zn [4];
  logic [AW-1:0]  zbase;

  assign ready = (state == S_READY);
  assign wa    = cnt - 1'b1;
  assign zbase = AW'(NAX) + AW'(iy) * AW'(NX) + AW'(ix);

  always_comb begin
    ram_raddr = AW'(cnt);
    if (state == S_FETCH) begin
      unique case (cnt[1:0])
        2'd0: ram_raddr = zbase;
        2'd1: ram_raddr = zbase + 1'b1;
        2'd2: ram_raddr = zbase + AW'(NX);
        default: ram_raddr = zbase + AW'(NX) + 1'b1;
      endcase
    end
  end

  // Axis copy: word of address cnt-1 arrives from the map RAM this clock.
  always_comb begin
    xr_we    = (state == S_LOAD) && (cnt != '0) && (wa < CW'(NX));
    yr_we    = (state == S_LOAD) && (cnt != '0) && (wa >= CW'(NX));
    xr_waddr = XAW'(wa);
    yr_waddr = YAW'(wa - CW'(NX));
    xr_wdata = ram_rdata;
    yr_wdata = ram_rdata;
  end

  assign srch_start = (state == S_READY) && start;
  assign srch_x     = x;
  assign srch_y     = y;

  assign xr_addr_lo = ix;
  assign xr_addr_hi = ix + 1'b1;
  assign yr_addr_lo = iy;
  assign yr_addr_hi = iy + 1'b1;
  assign ip_x   = x_q;
  assign ip_x0  = xr_lo;
  assign ip_x1  = xr_hi;
  assign ip_y   = y_q;
  assign ip_y0  = yr_lo;
  assign ip_y1  = yr_hi;
  assign ip_z00 = zn[0];
  assign ip_z10 = zn[1];
  assign ip_z01 = zn[2];
  assign ip_z11 = zn[3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_EMPTY;
      cnt      <= '0;
      xd       <= 1'b0;
      yd       <= 1'b0;
      ix       <= '0;
      iy       <= '0;
      x_q      <= F32_ZERO;
      y_q      <= F32_ZERO;
      for (int i = 0; i < 4; i++) zn[i] <= F32_ZERO;
      ip_start <= 1'b0;
      done     <= 1'b0;
      z        <= F32_ZERO;
    end else begin
      ip_start <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        S_EMPTY, S_READY: begin
          if (load) begin
            state <= S_LOAD;
            cnt   <= '0;
          end else if (state == S_READY && start) begin
            state <= S_SEARCH;
            x_q   <= x;
            y_q   <= y;
            xd    <= 1'b0;
            yd    <= 1'b0;
          end
        end
        S_LOAD: begin
          if (cnt == CW'(NAX)) state <= S_READY;
          cnt <= cnt + 1'b1;
        end
        S_SEARCH: begin
          if (xs_done) begin xd <= 1'b1; ix <= xs_index; end
          if (ys_done) begin yd <= 1'b1; iy <= ys_index; end
          if ((xd || xs_done) && (yd || ys_done)) begin
            state <= S_FETCH;
            cnt   <= '0;
          end
        end
        S_FETCH: begin
          if (cnt != '0) zn[2'(cnt - 1'b1)] <= ram_rdata;
          cnt <= cnt + 1'b1;
          if (cnt == CW'(4)) begin
            state    <= S_INTERP;
            ip_start <= 1'b1;
          end
        end
        S_INTERP: begin
          if (ip_done) begin
            state <= S_READY;
            done  <= 1'b1;
            z     <= ip_z;
          end
        end
        default: state <= S_EMPTY;
      endcase
    end
  end
endmodule
