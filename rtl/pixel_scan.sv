// pixel_scan: image buffer that feeds the input layer one pixel per clock.
//
// The host writes the N_PIX sign-magnitude pixels of an image (index 1..N_PIX)
// through img_*; a flag per pixel records whether its magnitude is non-zero.
// Each pass_start pulse sends the whole image once, as one time step, on a
// valid/ready stream of (index, value) followed by a token with pix_end high.
// With SKIP_ZEROS = 1 the non-zero flags go through a PE&PRI unit, so only
// non-zero pixels are sent, highest index first, and an image with few lit
// pixels (as handwritten digits are) takes few cycles. With SKIP_ZEROS = 0
// every pixel is sent in order 1..N_PIX, which needs no encoder.
//
// Timing: pass_start is taken while busy is low; the first pixel is offered on
// the next clock (SKIP_ZEROS = 1) or the same pass begins at index 1 on the
// next clock (SKIP_ZEROS = 0). One pixel per clock while pix_ready is high; the
// end token follows the last pixel. Both modes and their purpose follow the
// published input layer; the buffer, stream format and scan order are this
// design's own.
module pixel_scan #(
  parameter int unsigned N_PIX      = 784,
  parameter int unsigned PIX_W      = 8,
  parameter bit          SKIP_ZEROS = 1'b1,
  parameter int unsigned AW         = $clog2(N_PIX + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // image load
  input  logic             img_we,
  input  logic [AW-1:0]    img_addr,
  input  logic [PIX_W-1:0] img_data,
  // pass control
  input  logic             pass_start,
  output logic             busy,
  // pixel stream
  output logic             pix_valid,
  input  logic             pix_ready,
  output logic             pix_end,
  output logic [AW-1:0]    pix_idx,
  output logic [PIX_W-1:0] pix_val
);
  localparam int unsigned IW = ((N_PIX + 1) <= 16) ? 4 : $clog2(N_PIX + 1);

  logic [PIX_W-1:0] img [1:N_PIX];
  logic [N_PIX:0]   nz;            // bit j: pixel j non-zero; bit 0 unused
  logic             active;
  logic [AW-1:0]    cur;           // current index
  logic             at_end;

  always_ff @(posedge clk) begin
    if (img_we && img_addr >= AW'(1) && img_addr <= AW'(N_PIX))
      img[img_addr] <= img_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) nz <= '0;
    else if (img_we && img_addr >= AW'(1) && img_addr <= AW'(N_PIX))
      nz[img_addr] <= (img_data[PIX_W-2:0] != '0);
  end

  assign busy      = active;
  assign pix_valid = active;
  assign pix_end   = at_end;
  assign pix_idx   = at_end ? '0 : cur;
  assign pix_val   = at_end ? '0 : img[cur];

  if (SKIP_ZEROS) begin : g_skip
    logic [IW-1:0] idx;
    logic          pending;

    pe_pri #(.W(N_PIX + 1)) u_pepri (
      .clk, .rst_n,
      .load    (pass_start && !active),
      .din     (nz),
      .adv     (active && pix_ready),
      .idx,
      .pending
    );

    assign cur    = AW'(idx);
    assign at_end = !pending;

    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)                            active <= 1'b0;
      else if (pass_start && !active)        active <= 1'b1;
      else if (active && at_end && pix_ready) active <= 1'b0;

  end else begin : g_all
    logic [AW-1:0] cnt;
    logic          done;

    assign cur    = cnt;
    assign at_end = done;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        active <= 1'b0;
        cnt    <= AW'(1);
        done   <= 1'b0;
      end else if (pass_start && !active) begin
        active <= 1'b1;
        cnt    <= AW'(1);
        done   <= 1'b0;
      end else if (active && pix_ready) begin
        if (done)                       active <= 1'b0;
        else if (cnt == AW'(N_PIX))     done   <= 1'b1;
        else                            cnt    <= cnt + 1'b1;
      end
    end
  end

endmodule
