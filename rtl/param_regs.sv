// param_regs: parameter registers on the host interface.
//
// The host writes 128-bit words by address. Addresses 0..15 are the
// constant memory of the vertex processing unit (passed on through
// const_we/const_addr/const_wdata, as the host interface reaches the VPU
// directly); address 16 holds the eye position (x, y, z) used by the
// backface test; address 17 holds the subdivision level (lane x, bits
// [1:0], values above 2 read as 2) and the highlight-test threshold N.H
// (lane y, Q16.16). Reads return the register at host_addr combinationally.
// The document shows the parameter registers, the 96-bit eye position and
// the host interface but no register map: the map is this design's.
module param_regs
  import ge_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       host_we,
  input  logic [5:0] host_addr,
  input  vec4_t      host_wdata,
  output vec4_t      host_rdata,
  output logic       const_we,
  output logic [3:0] const_addr,
  output vec4_t      const_wdata,
  output vec4_t      eye_pos,
  output level_t     level,
  output fx_t        h_threshold
);
  vec4_t ctrl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eye_pos <= '0;
      ctrl    <= '{x: '0, y: fx_t'(32'h0000_B333), default: '0};  // level 0, threshold 0.7
    end else if (host_we) begin
      if (host_addr == 6'd16) eye_pos <= host_wdata;
      if (host_addr == 6'd17) ctrl    <= host_wdata;
    end
  end

  assign level       = (ctrl.x[1:0] > 2'd2) ? 2'd2 : ctrl.x[1:0];
  assign h_threshold = ctrl.y;
  assign const_we    = host_we && host_addr < 6'd16;
  assign const_addr  = host_addr[3:0];
  assign const_wdata = host_wdata;
  assign host_rdata  = (host_addr == 6'd16) ? eye_pos :
                       (host_addr == 6'd17) ? ctrl : '0;
endmodule
