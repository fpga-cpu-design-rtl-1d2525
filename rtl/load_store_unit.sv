// Mem-access stage: load/store unit, the data-side Wishbone master.
//
// For a valid load or store it drives a classic Wishbone cycle at the word
// holding the ALU-computed address: byte selects from the access size (byte,
// halfword, word) and the low address bits, store data replicated into the
// addressed byte lanes, we set for stores. cyc and stb stay up until ack (or
// err, treated like ack); until then busy stalls the pipeline. Load data is
// shifted down from its byte lane and zero- or sign-extended per funct3. The
// request is combinational from the stage register, which holds still while
// busy. Accesses are assumed naturally aligned (no misalignment trap).
//
// The original lists what this unit does (address and write data out, read
// data in, a valid/ready handshake) but not how; valid in and busy out, and
// the byte-lane handling, are this design's own.
module load_store_unit
  import icicle_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        valid,
  input  logic        load,
  input  logic        store,
  input  logic [2:0]  funct3,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        busy,
  // data bus
  output logic [29:0] dbus_adr,
  output logic [31:0] dbus_dat_w,
  output logic [3:0]  dbus_sel,
  output logic        dbus_cyc,
  output logic        dbus_stb,
  output logic        dbus_we,
  input  logic [31:0] dbus_dat_r,
  input  logic        dbus_ack,
  input  logic        dbus_err
);
  logic        req;
  logic [1:0]  ofs;
  logic [31:0] shifted;

  assign req = valid && (load || store);
  assign ofs = addr[1:0];

  always_comb begin
    dbus_cyc = req;
    dbus_stb = req;
    dbus_we  = store;
    dbus_adr = addr[31:2];
    unique case (funct3[1:0])
      2'b00:   begin dbus_sel = 4'b0001 << ofs;           dbus_dat_w = {4{wdata[7:0]}};  end
      2'b01:   begin dbus_sel = 4'b0011 << {ofs[1], 1'b0}; dbus_dat_w = {2{wdata[15:0]}}; end
      default: begin dbus_sel = 4'b1111;                  dbus_dat_w = wdata;            end
    endcase
    busy = req && !(dbus_ack || dbus_err);

    shifted = dbus_dat_r >> {ofs, 3'b000};
    unique case (funct3)
      F3_B:    rdata = {{24{shifted[7]}}, shifted[7:0]};
      F3_H:    rdata = {{16{shifted[15]}}, shifted[15:0]};
      F3_BU:   rdata = {24'd0, shifted[7:0]};
      F3_HU:   rdata = {16'd0, shifted[15:0]};
      default: rdata = dbus_dat_r;
    endcase
  end

  // Wishbone master rule: the request stays up, unchanged, until answered.
  property p_hold_request;
    @(posedge clk) disable iff (rst) (dbus_stb && !dbus_ack && !dbus_err) |=> (dbus_stb && $stable(dbus_adr) && $stable(dbus_we));
  endproperty
  assert property (p_hold_request);
endmodule
