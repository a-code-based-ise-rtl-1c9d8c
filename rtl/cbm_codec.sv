// cbm_codec: code-based encoder/decoder of the CBM datapath.
//
// A 32-bit word is read as a vector of eight elements of GF(2^4) (element k in
// bits [4k+3:4k], field polynomial x^4 + x + 1) and multiplied by the 8x8
// involutory MDS matrix
//     2  3  4 12  5 10  8 15
//     3  2 12  4 10  5 15  8
//     4 12  2  3  8 15  5 10
//    12  4  3  2 15  8 10  5
//     5 10  8 15  2  3  4 12
//    10  5 15  8  3  2 12  4
//     8 15  5 10  4 12  2  3
//    15  8 10  5 12  4  3  2
// Because A = A^-1 the same circuit serves as encoder (Enc(x) = A x) and as
// decoder (Dec(x) = A^-1 x). Over GF(2) the product is a 32x32 bit matrix,
// computed here with the area-optimised straight-line program of 182 two-input
// XORs: wire t[0..31] carries the input with t[0] = x[31] (MSB first), every
// further wire t[32+i] is the XOR of the two earlier wires named in SLP[i], and
// output bit 31-j is wire OUT_IDX[j]. The program and the output list are the
// published area-optimised linear program; the MSB-first bit numbering and the
// field polynomial are the ones under which that program equals the matrix
// above. Purely combinational, no clock.
module cbm_codec (
  input  logic [31:0] x_i,
  output logic [31:0] y_o
);

  localparam int unsigned NXOR = 182;
  localparam int unsigned NT   = 32 + NXOR;

  typedef logic [7:0] idx_t;
  typedef idx_t pair_t [2];

  localparam pair_t SLP [NXOR] = '{
    '{8'd6, 8'd5}, '{8'd17, 8'd22}, '{8'd10, 8'd25}, '{8'd20, 8'd21}, '{8'd26, 8'd29}, '{8'd31, 8'd33}, '{8'd36, 8'd9}, '{8'd23, 8'd30},
    '{8'd37, 8'd24}, '{8'd12, 8'd35}, '{8'd11, 8'd2}, '{8'd8, 8'd16}, '{8'd42, 8'd43}, '{8'd41, 8'd39}, '{8'd24, 8'd0}, '{8'd40, 8'd39},
    '{8'd4, 8'd14}, '{8'd22, 8'd15}, '{8'd47, 8'd32}, '{8'd28, 8'd29}, '{8'd29, 8'd48}, '{8'd48, 8'd27}, '{8'd16, 8'd52}, '{8'd53, 8'd35},
    '{8'd1, 8'd32}, '{8'd19, 8'd35}, '{8'd57, 8'd34}, '{8'd55, 8'd2}, '{8'd58, 8'd39}, '{8'd39, 8'd5}, '{8'd51, 8'd45}, '{8'd9, 8'd56},
    '{8'd27, 8'd18}, '{8'd2, 8'd45}, '{8'd64, 8'd38}, '{8'd61, 8'd38}, '{8'd35, 8'd50}, '{8'd68, 8'd43}, '{8'd7, 8'd21}, '{8'd33, 8'd5},
    '{8'd45, 8'd18}, '{8'd5, 8'd21}, '{8'd21, 8'd66}, '{8'd43, 8'd0}, '{8'd75, 8'd49}, '{8'd0, 8'd67}, '{8'd52, 8'd70}, '{8'd70, 8'd65},
    '{8'd78, 8'd62}, '{8'd25, 8'd72}, '{8'd34, 8'd13}, '{8'd13, 8'd67}, '{8'd67, 8'd54}, '{8'd84, 8'd63}, '{8'd79, 8'd14}, '{8'd86, 8'd77},
    '{8'd77, 8'd66}, '{8'd50, 8'd60}, '{8'd88, 8'd49}, '{8'd66, 8'd46}, '{8'd49, 8'd59}, '{8'd91, 8'd44}, '{8'd92, 8'd54}, '{8'd46, 8'd54},
    '{8'd54, 8'd18}, '{8'd18, 8'd62}, '{8'd97, 8'd44}, '{8'd90, 8'd98}, '{8'd98, 8'd56}, '{8'd62, 8'd69}, '{8'd69, 8'd14}, '{8'd14, 8'd73},
    '{8'd73, 8'd56}, '{8'd56, 8'd65}, '{8'd65, 8'd44}, '{8'd44, 8'd81}, '{8'd101, 8'd81}, '{8'd108, 8'd74}, '{8'd83, 8'd72}, '{8'd103, 8'd110},
    '{8'd81, 8'd110}, '{8'd110, 8'd59}, '{8'd59, 8'd74}, '{8'd114, 8'd30}, '{8'd74, 8'd60}, '{8'd106, 8'd60}, '{8'd60, 8'd63}, '{8'd95, 8'd76},
    '{8'd76, 8'd32}, '{8'd85, 8'd3}, '{8'd63, 8'd112}, '{8'd122, 8'd107}, '{8'd32, 8'd15}, '{8'd15, 8'd72}, '{8'd107, 8'd30}, '{8'd3, 8'd89},
    '{8'd30, 8'd125}, '{8'd125, 8'd89}, '{8'd94, 8'd105}, '{8'd105, 8'd82}, '{8'd100, 8'd111}, '{8'd111, 8'd123}, '{8'd123, 8'd89}, '{8'd72, 8'd38},
    '{8'd128, 8'd120}, '{8'd120, 8'd71}, '{8'd129, 8'd82}, '{8'd89, 8'd116}, '{8'd102, 8'd80}, '{8'd113, 8'd140}, '{8'd140, 8'd104}, '{8'd118, 8'd124},
    '{8'd135, 8'd71}, '{8'd71, 8'd127}, '{8'd124, 8'd87}, '{8'd104, 8'd127}, '{8'd127, 8'd80}, '{8'd112, 8'd145}, '{8'd119, 8'd145}, '{8'd87, 8'd117},
    '{8'd137, 8'd121}, '{8'd117, 8'd109}, '{8'd152, 8'd139}, '{8'd132, 8'd131}, '{8'd80, 8'd144}, '{8'd121, 8'd133}, '{8'd153, 8'd145}, '{8'd139, 8'd130},
    '{8'd145, 8'd148}, '{8'd150, 8'd144}, '{8'd144, 8'd126}, '{8'd130, 8'd38}, '{8'd126, 8'd138}, '{8'd38, 8'd82}, '{8'd82, 8'd134}, '{8'd165, 8'd93},
    '{8'd146, 8'd96}, '{8'd148, 8'd136}, '{8'd138, 8'd96}, '{8'd134, 8'd141}, '{8'd160, 8'd99}, '{8'd149, 8'd116}, '{8'd168, 8'd93}, '{8'd96, 8'd172},
    '{8'd175, 8'd162}, '{8'd109, 8'd159}, '{8'd93, 8'd155}, '{8'd169, 8'd170}, '{8'd159, 8'd166}, '{8'd170, 8'd147}, '{8'd141, 8'd163}, '{8'd116, 8'd161},
    '{8'd161, 8'd179}, '{8'd147, 8'd156}, '{8'd157, 8'd167}, '{8'd182, 8'd185}, '{8'd115, 8'd178}, '{8'd183, 8'd176}, '{8'd133, 8'd142}, '{8'd142, 8'd167},
    '{8'd99, 8'd174}, '{8'd172, 8'd184}, '{8'd163, 8'd158}, '{8'd174, 8'd193}, '{8'd158, 8'd154}, '{8'd167, 8'd194}, '{8'd194, 8'd188}, '{8'd188, 8'd180},
    '{8'd155, 8'd173}, '{8'd180, 8'd184}, '{8'd173, 8'd181}, '{8'd136, 8'd166}, '{8'd171, 8'd164}, '{8'd162, 8'd177}, '{8'd131, 8'd151}, '{8'd193, 8'd154},
    '{8'd192, 8'd143}, '{8'd178, 8'd166}, '{8'd176, 8'd187}, '{8'd156, 8'd186}, '{8'd203, 8'd189}, '{8'd143, 8'd197}
  };

  localparam idx_t OUT_IDX [32] = '{
    8'd202, 8'd164, 8'd189, 8'd184, 8'd209, 8'd205, 8'd210, 8'd186, 8'd195, 8'd211, 8'd196, 8'd177, 8'd213, 8'd185, 8'd199, 8'd166, 8'd201, 8'd154, 8'd208, 8'd181, 8'd198, 8'd191, 8'd207, 8'd151, 8'd179, 8'd206, 8'd204, 8'd190, 8'd212, 8'd187, 8'd200, 8'd197
  };

  // The wires are evaluated in program order inside one combinational block;
  // every XOR reads only wires defined before it.
  always_comb begin
    logic [NT-1:0] t;
    t = '0;
    for (int i = 0; i < 32; i++) t[i] = x_i[31-i];
    for (int i = 0; i < NXOR; i++) t[32+i] = t[SLP[i][0]] ^ t[SLP[i][1]];
    for (int j = 0; j < 32; j++) y_o[31-j] = t[OUT_IDX[j]];
  end

endmodule
