// tb_femip_top: end-to-end run of the whole core on 64x64 frames (see
// femip_bench for the scene and the checks).
module tb_femip_top;
  femip_bench #(.FULL(0), .W(64), .H(64), .TLO(8), .THI(150), .THR0(64'd1 << 33),
                .NSQ(3), .NFRAMES(9), .SKIP_AT(3), .WDOG(64'd3000000)) bench ();
endmodule
