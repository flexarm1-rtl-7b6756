// flexarm_vga - VGA display core for the FlexARM1 test bed.
//
// Generates the horizontal and vertical sync and the three colour signals
// of a 640x480, 60 Hz VGA picture (800 x 525 pixel periods per frame,
// 16/96/48 horizontal and 10/2/33 vertical front porch/sync/back porch,
// both syncs active low) and draws the sixteen CPU registers on it, so that
// they can be watched in real time. Row k of 30 lines shows register k; each
// of its 32 bits is a 20-pixel cell, bit 31 on the left, green for 1 and blue
// for 0, with a black border line on the cell's left and top edges.
// The core addresses the register file through reg_addr and expects
// reg_data combinationally in the same clock.
//
// One pixel lasts PIX_DIV clock cycles (2 gives 25 MHz from a 50 MHz clock).
// Outputs are registered, one pixel period behind the counters. That the
// core makes the syncs and RGB and shows the registers follows the FlexARM1
// test bed; the resolution, timing and picture layout are this design's.
module flexarm_vga #(
  parameter int unsigned PIX_DIV = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [3:0]  reg_addr,
  input  logic [31:0] reg_data,
  output logic        hs,
  output logic        vs,
  output logic        r,
  output logic        g,
  output logic        b
);

  localparam logic [9:0] H_VIS = 10'd640, H_FP = 10'd16, H_SY = 10'd96, H_TOT = 10'd800;
  localparam logic [9:0] V_VIS = 10'd480, V_FP = 10'd10, V_SY = 10'd2,  V_TOT = 10'd525;
  localparam logic [4:0] CELL_W = 5'd20, CELL_H = 5'd30;
  localparam int unsigned DW = $clog2(PIX_DIV + 1);
  localparam logic [DW-1:0] DIV_LAST = DW'(PIX_DIV - 1);

  logic [DW-1:0] div;
  logic       pix;
  logic [9:0] hc, vc;        // position in the frame
  logic [4:0] cx, cy;        // position inside the current cell
  logic [4:0] bitn;          // bit column 0..31, left to right
  logic [3:0] row;           // register row

  assign pix = (div == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div <= '0; hc <= '0; vc <= '0; cx <= '0; cy <= '0; bitn <= '0; row <= '0;
    end else begin
      div <= (div == DIV_LAST) ? '0 : div + 1'b1;
      if (pix) begin
        if (hc == H_TOT - 10'd1) begin
          hc <= '0; cx <= '0; bitn <= '0;
          if (vc == V_TOT - 10'd1) begin
            vc <= '0; cy <= '0; row <= '0;
          end else begin
            vc <= vc + 1'b1;
            if (cy == CELL_H - 5'd1) begin cy <= '0; row <= row + 1'b1; end
            else cy <= cy + 1'b1;
          end
        end else begin
          hc <= hc + 1'b1;
          if (cx == CELL_W - 5'd1) begin cx <= '0; bitn <= bitn + 1'b1; end
          else cx <= cx + 1'b1;
        end
      end
    end
  end

  assign reg_addr = row;

  logic vis, border, bitv;
  always_comb begin
    vis    = (hc < H_VIS) && (vc < V_VIS);
    border = (cx == '0) || (cy == '0);
    bitv   = reg_data[5'd31 - bitn];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs <= 1'b1; vs <= 1'b1; r <= 1'b0; g <= 1'b0; b <= 1'b0;
    end else if (pix) begin
      hs <= !((hc >= H_VIS + H_FP) && (hc < H_VIS + H_FP + H_SY));
      vs <= !((vc >= V_VIS + V_FP) && (vc < V_VIS + V_FP + V_SY));
      r  <= 1'b0;
      g  <= vis && !border && bitv;
      b  <= vis && !border && !bitv;
    end
  end

endmodule
