// cordic_vectoring: iterative CORDIC in vectoring mode, returning the angle of a first-quadrant
// vector.
//
// The vector (x, y) is rotated towards the x axis by +/-atan(2^-i) in iteration i = 0 .. ITERS-1:
// if y is negative it is rotated up and the angle decreases, otherwise it is rotated down and the
// angle increases, and the rotation uses only shifts and adds. One iteration is done per clock, so
// a result takes ITERS clocks; the document chooses 20 iterations on 20-bit inputs and gives this
// iteration. After the last iteration x holds the magnitude times the CORDIC gain (about 1.6468).
// The arctangent constants come from sync_pkg::ATAN_LUT in binary-angle units (2^24 = one turn).
// Inputs must be non-negative; the caller folds other quadrants, as in the document.
//
// Interface: start loads x_in/y_in and performs iteration 0 on the same edge; iterations 1..ITERS-1
// follow on the next clocks. done pulses for one clock with angle and mag valid ITERS clocks after
// the clock in which start was sampled; angle and mag then hold until the next result. start is
// ignored while busy; a permanently asserted start produces one result every ITERS clocks (the
// next conversion loads in the clock in which done is high). tag_in is an opaque value
// carried alongside a conversion and returned on tag_out with its result.
module cordic_vectoring
  import sync_pkg::*;
#(
  parameter int unsigned IN_W  = 20,
  parameter int unsigned ITERS = CORDIC_ITERS,
  parameter int unsigned TAG_W = 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic [IN_W-1:0]    x_in,
  input  logic [IN_W-1:0]    y_in,
  input  logic [TAG_W-1:0]   tag_in,
  output logic               busy,
  output logic               done,
  output logic [ANGLE_W-1:0] angle,
  output logic [IN_W+1:0]    mag,
  output logic [TAG_W-1:0]   tag_out
);
  localparam int unsigned W  = IN_W + 2;          // room for the gain and the sign of y
  localparam int unsigned IW = $clog2(ITERS + 1);

  initial assert (ITERS >= 2 && ITERS <= CORDIC_ITERS) else $error("cordic_vectoring: bad ITERS");

  typedef struct packed {
    logic signed [W-1:0]  x;
    logic signed [W-1:0]  y;
    logic [ANGLE_W-1:0]   a;
  } cstate_t;

  cstate_t st, st_step, st_load;
  logic [IW-1:0] it;
  logic [TAG_W-1:0] tag_q;
  logic last;

  function automatic cstate_t iterate(input cstate_t s, input int unsigned i);
    cstate_t o;
    logic signed [W-1:0] dx, dy;
    dx = s.x >>> i;
    dy = s.y >>> i;
    if (s.y < 0) begin
      o.x = s.x - dy;
      o.y = s.y + dx;
      o.a = s.a - ATAN_LUT[i];
    end else begin
      o.x = s.x + dy;
      o.y = s.y - dx;
      o.a = s.a + ATAN_LUT[i];
    end
    return o;
  endfunction

  always_comb begin
    st_load = iterate('{x: W'(x_in), y: W'(y_in), a: '0}, 0);
    st_step = iterate(st, int'(it));
    last    = busy && (it == IW'(ITERS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st    <= '0;
      it    <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      angle <= '0;
      mag   <= '0;
      tag_q <= '0;
      tag_out <= '0;
    end else begin
      done <= 1'b0;
      if (last) begin
        done  <= 1'b1;
        angle <= st_step.a;
        mag   <= st_step.x;
        tag_out <= tag_q;
      end
      if (start && !busy) begin
        st   <= st_load;
        tag_q <= tag_in;
        it   <= IW'(1);
        busy <= 1'b1;
      end else if (busy) begin
        st   <= st_step;
        it   <= it + 1'b1;
        busy <= !last;
      end
    end
  end
endmodule
