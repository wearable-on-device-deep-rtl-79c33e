// swab_segment: picks the window of a gesture record that holds the
// movement.
//
// For every frame f of the record the change measure
//   signal(f) = sum over the 6 sensors of (ax^2 + ay^2)
// (the sum of the squares of all NCH = 12 de-noised angles) is formed,
// one sample per clock.  Frame 0 belongs to the still preparation stage
// and is the baseline; a frame is active when |signal(f) - signal(0)|
// exceeds seg_th.  After the last frame the window of SEG_LEN frames is
// centred on the midpoint of the first and last active frame and clamped
// into the record, so every channel gets the same start and length.  With
// no active frame the window starts at 0.
//
// Interface: start clears the block and latches nframes and seg_th; the
// samples then follow frame by frame, channel by channel, on in_valid /
// in_data (Q9.7).  done pulses one clock after the last sample, with
// seg_start, the first and last active frame and any_active.  signal is
// kept in integer units (angle^2), the Q14 square sum shifted by 14.
//
// From the document: the change measure, the unified window length and
// the idea of passing start and end points on.  The activity rule and the
// centring are this design's simplification of the SWAB segmentation.
module swab_segment
  import gr_pkg::*;
#(
  parameter int NCHAN      = NCH,
  parameter int SEGL       = SEG_LEN,
  parameter int MAX_FRAMES = 128
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start,
  input  logic [$clog2(MAX_FRAMES+1)-1:0] nframes,
  input  logic [31:0]                    seg_th,
  input  logic                           in_valid,
  input  data_t                          in_data,
  output logic                           done,
  output logic [$clog2(MAX_FRAMES+1)-1:0] seg_start,
  output logic [$clog2(MAX_FRAMES+1)-1:0] first_act,
  output logic [$clog2(MAX_FRAMES+1)-1:0] last_act,
  output logic                           any_active
);

  localparam int FW = $clog2(MAX_FRAMES + 1);

  logic [FW-1:0] nfr, f;
  logic [31:0]   th;
  logic [$clog2(NCHAN+1)-1:0] ch;
  logic [39:0]   sq_acc;
  logic [31:0]   base;
  logic          running;

  logic [39:0] sq_next;
  logic [31:0] sig;
  logic [31:0] diff;
  always_comb begin
    sq_next = sq_acc + 40'(32'(in_data) * 32'(in_data));
    sig     = 32'(sq_next >> 14);
    diff    = (sig > base) ? sig - base : base - sig;
  end

  // window start from first/last active frame
  function automatic logic [FW-1:0] place(input logic [FW-1:0] fa, input logic [FW-1:0] la,
                                          input logic [FW-1:0] n, input logic act);
    int mid, s;
    mid = (int'(fa) + int'(la)) / 2;
    s   = mid - SEGL / 2;
    if (!act || int'(n) <= SEGL || s < 0) s = 0;
    else if (s > int'(n) - SEGL)          s = int'(n) - SEGL;
    return FW'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nfr <= '0; f <= '0; th <= '0; ch <= '0; sq_acc <= '0; base <= '0;
      running <= 1'b0; done <= 1'b0;
      seg_start <= '0; first_act <= '0; last_act <= '0; any_active <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        nfr <= nframes; th <= seg_th; f <= '0; ch <= '0; sq_acc <= '0;
        running <= (nframes != 0); any_active <= 1'b0;
        first_act <= '0; last_act <= '0;
        if (nframes == 0) begin
          seg_start <= '0;
          done <= 1'b1;
        end
      end else if (running && in_valid) begin
        if (32'(ch) == NCHAN - 1) begin
          logic act;
          ch <= '0;
          sq_acc <= '0;
          act = (f != 0) && (diff > th);
          if (f == 0) base <= sig;
          if (act) begin
            if (!any_active) first_act <= f;
            last_act <= f;
            any_active <= 1'b1;
          end
          if (f == nfr - 1'b1) begin
            running <= 1'b0;
            done <= 1'b1;
            if (act) seg_start <= place(any_active ? first_act : f, f, nfr, 1'b1);
            else     seg_start <= place(first_act, last_act, nfr, any_active);
          end
          f <= f + 1'b1;
        end else begin
          ch <= ch + 1'b1;
          sq_acc <= sq_next;
        end
      end
    end
  end

endmodule
