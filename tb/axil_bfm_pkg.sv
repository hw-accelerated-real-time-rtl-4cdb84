// axil_bfm_pkg: nothing but the register offsets of the Canny control slave,
// shared by the testbenches that drive it.
package axil_bfm_pkg;
  localparam logic [5:0] R_CTRL   = 6'h00;
  localparam logic [5:0] R_GIE    = 6'h04;
  localparam logic [5:0] R_IER    = 6'h08;
  localparam logic [5:0] R_ISR    = 6'h0C;
  localparam logic [5:0] R_FRAMES = 6'h10;
  localparam int CTRL_START = 0, CTRL_DONE = 1, CTRL_IDLE = 2, CTRL_READY = 3, CTRL_AUTO = 7;
endpackage
