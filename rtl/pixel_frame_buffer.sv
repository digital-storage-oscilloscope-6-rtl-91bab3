// pixel_frame_buffer: hands one channel's trace rows from the 100 MHz interpreter to the
// 65 MHz video side without tearing.
//
// The interpreter writes a frame's N rows into a staging RAM. frame_done marks the frame
// complete and sets `pending`. The copy engine waits until the video side reports that
// the raster is outside the grid (safe_65, synchronised here by two flip-flops), then
// copies the staging RAM into the display RAM, one word per 100 MHz clock (N+1 clocks).
// The drawer reads the display RAM at 65 MHz. `busy` is high from frame_done until the
// copy ends; the interpreter must not start a new pass meanwhile. Two buffers per channel
// and the wait for the raster to leave the grid follow the design description; the
// handshake signals are this design's.
module pixel_frame_buffer
  import dso_pkg::*;
#(
  parameter int unsigned N  = N_SAMPLES,
  parameter int unsigned AW = $clog2(N)
) (
  input  logic          clk,        // interpreter clock
  input  logic          rst,
  input  logic          pix_we,
  input  logic [AW-1:0] pix_addr,
  input  row_t          pix_row,
  input  logic          frame_done,
  input  logic          safe_65,    // from the video clock domain
  output logic          busy,
  output logic          copy_done,  // one pulse per completed copy
  input  logic          clk_video,
  input  logic [AW-1:0] rd_addr,
  output row_t          rd_row
);
  logic          pending, copying;
  logic [AW-1:0] copy_idx, stage_rd_addr, disp_wr_addr;
  logic          disp_we;
  row_t          stage_rd_data;
  logic [1:0]    safe_sync;

  dual_port_ram #(.DEPTH(N), .WIDTH(PIX_W), .AW(AW)) u_stage (
    .clk_a(clk), .we_a(pix_we), .wr_addr(pix_addr), .wr_data(pix_row),
    .clk_b(clk), .rd_addr(stage_rd_addr), .rd_data(stage_rd_data));

  dual_port_ram #(.DEPTH(N), .WIDTH(PIX_W), .AW(AW)) u_display (
    .clk_a(clk), .we_a(disp_we), .wr_addr(disp_wr_addr), .wr_data(stage_rd_data),
    .clk_b(clk_video), .rd_addr, .rd_data(rd_row));

  assign stage_rd_addr = copy_idx;
  assign busy = pending || copying;

  always_ff @(posedge clk) begin
    if (rst) begin
      safe_sync <= '0;
      pending <= 1'b0;
      copying <= 1'b0;
      copy_idx <= '0;
      disp_we <= 1'b0;
      disp_wr_addr <= '0;
      copy_done <= 1'b0;
    end else begin
      safe_sync <= {safe_sync[0], safe_65};
      disp_we <= 1'b0;
      copy_done <= 1'b0;
      if (frame_done) pending <= 1'b1;
      if (pending && !copying && safe_sync[1]) begin
        pending <= 1'b0;
        copying <= 1'b1;
        copy_idx <= '0;
      end else if (copying) begin
        // the staging word for copy_idx arrives one clock after its address
        disp_we <= 1'b1;
        disp_wr_addr <= copy_idx;
        if (32'(copy_idx) == N-1) begin
          copying <= 1'b0;
          copy_done <= 1'b1;
        end else begin
          copy_idx <= copy_idx + 1'b1;
        end
      end
    end
  end
endmodule
