// vga_timing: raster counters and sync/blank for 1024x768 at 60 Hz from a 65 MHz clock.
//
// hcount runs 0..1343 (1024 visible, 24 front porch, 136 sync, 160 back porch) and vcount
// 0..805 (768 visible, 3 front porch, 6 sync, 29 back porch). hsync/vsync are high during
// the sync pulse (the board pins take the inverse: this mode uses negative syncs) and
// blank is high outside the visible area. All outputs are registered and refer to the
// same pixel. The mode and its porch/sync numbers follow the design description; the
// counter structure is this design's own.
module vga_timing #(
  parameter int unsigned H_ACTIVE = 1024,
  parameter int unsigned H_FP     = 24,
  parameter int unsigned H_SYNC   = 136,
  parameter int unsigned H_BP     = 160,
  parameter int unsigned V_ACTIVE = 768,
  parameter int unsigned V_FP     = 3,
  parameter int unsigned V_SYNC   = 6,
  parameter int unsigned V_BP     = 29
) (
  input  logic        clk,
  input  logic        rst,
  output logic [10:0] hcount,
  output logic [9:0]  vcount,
  output logic        hsync,
  output logic        vsync,
  output logic        blank
);
  localparam int unsigned H_TOTAL = H_ACTIVE + H_FP + H_SYNC + H_BP;   // 1344
  localparam int unsigned V_TOTAL = V_ACTIVE + V_FP + V_SYNC + V_BP;   // 806

  logic [10:0] h_next;
  logic [9:0]  v_next;

  always_comb begin
    h_next = (32'(hcount) == H_TOTAL-1) ? '0 : hcount + 1'b1;
    v_next = vcount;
    if (32'(hcount) == H_TOTAL-1) v_next = (32'(vcount) == V_TOTAL-1) ? '0 : vcount + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
      vcount <= '0;
      hsync <= 1'b0;
      vsync <= 1'b0;
      blank <= 1'b0;
    end else begin
      hcount <= h_next;
      vcount <= v_next;
      hsync <= (32'(h_next) >= H_ACTIVE + H_FP) && (32'(h_next) < H_ACTIVE + H_FP + H_SYNC);
      vsync <= (32'(v_next) >= V_ACTIVE + V_FP) && (32'(v_next) < V_ACTIVE + V_FP + V_SYNC);
      blank <= (32'(h_next) >= H_ACTIVE) || (32'(v_next) >= V_ACTIVE);
    end
  end
endmodule
