// High level 2 microprogram: Rx process at 000, Tx process at 200 (hex).
// 10 bit words; see hl2_microcontroller for the instruction encoding.
@000
040 // 000 MVI T,0000
081 // 001 MOV RX1,T
082 // 002 MOV RX2,T
083 // 003 MOV RX3,T
050 // 004 MVI T,1000
087 // 005 MOV L1EN,T
054 // 006 MVI T,1010
088 // 007 MOV TX1,T
010 // 008 CHANGE
358 // 009 CJUMP CONN,0,0,wait_conn
008 // 00a -> wait_conn
050 // 00b MVI T,1000
088 // 00c MOV TX1,T
207 // 00d CCALL FLAGS,3,1,clear
0b3 // 00e -> clear
010 // 00f CHANGE
35a // 010 CJUMP CONN,1,0,rx_frame
01e // 011 -> rx_frame
3a1 // 012 CJUMP LS2,0,1,rx_frame
01e // 013 -> rx_frame
3a3 // 014 CJUMP LS2,1,1,rx_frame
01e // 015 -> rx_frame
3a9 // 016 CJUMP NEXT1,0,1,rx_frame
01e // 017 -> rx_frame
050 // 018 MVI T,1000
094 // 019 MOV LS2,T
058 // 01a MVI T,1100
096 // 01b MOV NEXT2,T
05e // 01c MVI T,1111
095 // 01d MOV NEXT1,T
30c // 01e CJUMP RX1,2,0,rx_loop
00f // 01f -> rx_loop
040 // 020 MVI T,0000
09f // 021 MOV L3,T
30e // 022 CJUMP RX1,3,0,rx_done
09c // 023 -> rx_done
321 // 024 CJUMP CTL1,0,1,not_i
064 // 025 -> not_i
0a4 // 026 MOV T,CTL1
097 // 027 MOV PST1,T
207 // 028 CCALL FLAGS,3,1,rev3
0b8 // 029 -> rev3
0b1 // 02a MOV T,VR
038 // 02b SUB
302 // 02c CJUMP FLAGS,1,0,out_of_seq
041 // 02d -> out_of_seq
010 // 02e CHANGE
0f1 // 02f MOV A,VR
042 // 030 MVI T,0001
030 // 031 ADD
04e // 032 MVI T,0111
020 // 033 AND
0d1 // 034 MOV VR,A
010 // 035 CHANGE
0b1 // 036 MOV T,VR
097 // 037 MOV PST1,T
207 // 038 CCALL FLAGS,3,1,rev3
0b8 // 039 -> rev3
0d6 // 03a MOV NEXT2,A
050 // 03b MVI T,1000
095 // 03c MOV NEXT1,T
044 // 03d MVI T,0010
09f // 03e MOV L3,T
307 // 03f CJUMP FLAGS,3,1,ack
04b // 040 -> ack
010 // 041 CHANGE
0b1 // 042 MOV T,VR
097 // 043 MOV PST1,T
207 // 044 CCALL FLAGS,3,1,rev3
0b8 // 045 -> rev3
0d6 // 046 MOV NEXT2,A
052 // 047 MVI T,1001
095 // 048 MOV NEXT1,T
307 // 049 CJUMP FLAGS,3,1,ack
04b // 04a -> ack
010 // 04b CHANGE
0a5 // 04c MOV T,CTL2
097 // 04d MOV PST1,T
207 // 04e CCALL FLAGS,3,1,rev3
0b8 // 04f -> rev3
0b2 // 050 MOV T,LASTACK
038 // 051 SUB
303 // 052 CJUMP FLAGS,1,1,rx_done
09c // 053 -> rx_done
030 // 054 ADD
0d2 // 055 MOV LASTACK,A
010 // 056 CHANGE
0f2 // 057 MOV A,LASTACK
0b0 // 058 MOV T,VS
038 // 059 SUB
302 // 05a CJUMP FLAGS,1,0,ack_flag
05e // 05b -> ack_flag
042 // 05c MVI T,0001
09e // 05d MOV T1,T
0f2 // 05e MOV A,LASTACK
050 // 05f MVI T,1000
028 // 060 OR
0da // 061 MOV CR2,A
307 // 062 CJUMP FLAGS,3,1,rx_done
09c // 063 -> rx_done
010 // 064 CHANGE
0e4 // 065 MOV A,CTL1
05a // 066 MVI T,1101
038 // 067 SUB
303 // 068 CJUMP FLAGS,1,1,undef
0ad // 069 -> undef
0e4 // 06a MOV A,CTL1
056 // 06b MVI T,1011
038 // 06c SUB
303 // 06d CJUMP FLAGS,1,1,undef
0ad // 06e -> undef
010 // 06f CHANGE
322 // 070 CJUMP CTL1,1,0,sup
04b // 071 -> sup
0e4 // 072 MOV A,CTL1
05e // 073 MVI T,1111
038 // 074 SUB
302 // 075 CJUMP FLAGS,1,0,not_sabm
087 // 076 -> not_sabm
0e5 // 077 MOV A,CTL2
04e // 078 MVI T,0111
020 // 079 AND
048 // 07a MVI T,0100
038 // 07b SUB
302 // 07c CJUMP FLAGS,1,0,not_sabm
087 // 07d -> not_sabm
010 // 07e CHANGE
040 // 07f MVI T,0000
090 // 080 MOV VS,T
091 // 081 MOV VR,T
092 // 082 MOV LASTACK,T
207 // 083 CCALL FLAGS,3,1,send_ua
0c6 // 084 -> send_ua
307 // 085 CJUMP FLAGS,3,1,rx_done
09c // 086 -> rx_done
010 // 087 CHANGE
0e4 // 088 MOV A,CTL1
058 // 089 MVI T,1100
038 // 08a SUB
302 // 08b CJUMP FLAGS,1,0,rx_done
09c // 08c -> rx_done
0e5 // 08d MOV A,CTL2
04e // 08e MVI T,0111
020 // 08f AND
0d8 // 090 MOV PST2,A
04c // 091 MVI T,0110
038 // 092 SUB
303 // 093 CJUMP FLAGS,1,1,got_ua
0a1 // 094 -> got_ua
0f8 // 095 MOV A,PST2
044 // 096 MVI T,0010
038 // 097 SUB
302 // 098 CJUMP FLAGS,1,0,rx_done
09c // 099 -> rx_done
207 // 09a CCALL FLAGS,3,1,send_ua
0c6 // 09b -> send_ua
010 // 09c CHANGE
207 // 09d CCALL FLAGS,3,1,clear
0b3 // 09e -> clear
307 // 09f CJUMP FLAGS,3,1,rx_loop
00f // 0a0 -> rx_loop
3a0 // 0a1 CJUMP LS2,0,0,rx_done
09c // 0a2 -> rx_done
048 // 0a3 MVI T,0100
094 // 0a4 MOV LS2,T
040 // 0a5 MVI T,0000
090 // 0a6 MOV VS,T
091 // 0a7 MOV VR,T
092 // 0a8 MOV LASTACK,T
042 // 0a9 MVI T,0001
09e // 0aa MOV T1,T
307 // 0ab CJUMP FLAGS,3,1,rx_done
09c // 0ac -> rx_done
042 // 0ad MVI T,0001
096 // 0ae MOV NEXT2,T
05c // 0af MVI T,1110
095 // 0b0 MOV NEXT1,T
307 // 0b1 CJUMP FLAGS,3,1,rx_done
09c // 0b2 -> rx_done
040 // 0b3 MVI T,0000
081 // 0b4 MOV RX1,T
082 // 0b5 MOV RX2,T
083 // 0b6 MOV RX3,T
107 // 0b7 CRET FLAGS,3,1
060 // 0b8 MVI A,0000
3be // 0b9 CJUMP PST1,3,0,r1
0bd // 0ba -> r1
048 // 0bb MVI T,0100
028 // 0bc OR
3bc // 0bd CJUMP PST1,2,0,r2
0c1 // 0be -> r2
044 // 0bf MVI T,0010
028 // 0c0 OR
3ba // 0c1 CJUMP PST1,1,0,r3
0c5 // 0c2 -> r3
042 // 0c3 MVI T,0001
028 // 0c4 OR
107 // 0c5 CRET FLAGS,3,1
0e5 // 0c6 MOV A,CTL2
050 // 0c7 MVI T,1000
020 // 0c8 AND
04c // 0c9 MVI T,0110
028 // 0ca OR
0d6 // 0cb MOV NEXT2,A
058 // 0cc MVI T,1100
095 // 0cd MOV NEXT1,T
107 // 0ce CRET FLAGS,3,1
@200
010 // 200 CHANGE
340 // 201 CJUMP TX1,0,0,tx_wait
200 // 202 -> tx_wait
3a9 // 203 CJUMP NEXT1,0,1,tx_resp
237 // 204 -> tx_resp
3fc // 205 CJUMP L3,2,0,tx_wait
200 // 206 -> tx_wait
0f0 // 207 MOV A,VS
0b2 // 208 MOV T,LASTACK
038 // 209 SUB
04e // 20a MVI T,0111
020 // 20b AND
0d8 // 20c MOV PST2,A
0fb // 20d MOV A,CR3
04e // 20e MVI T,0111
020 // 20f AND
0b8 // 210 MOV T,PST2
038 // 211 SUB
303 // 212 CJUMP FLAGS,1,1,tx_wait
200 // 213 -> tx_wait
301 // 214 CJUMP FLAGS,0,1,tx_wait
200 // 215 -> tx_wait
010 // 216 CHANGE
340 // 217 CJUMP TX1,0,0,tx_wait
200 // 218 -> tx_wait
0ac // 219 MOV T,CADR
08a // 21a MOV ADDRTX,T
0b0 // 21b MOV T,VS
097 // 21c MOV PST1,T
207 // 21d CCALL FLAGS,3,1,rev3
0b8 // 21e -> rev3
0c4 // 21f MOV CTL1,A
010 // 220 CHANGE
0b1 // 221 MOV T,VR
097 // 222 MOV PST1,T
207 // 223 CCALL FLAGS,3,1,rev3
0b8 // 224 -> rev3
0c5 // 225 MOV CTL2,A
040 // 226 MVI T,0000
089 // 227 MOV TX2,T
088 // 228 MOV TX1,T
09e // 229 MOV T1,T
010 // 22a CHANGE
3fa // 22b CJUMP L3,1,0,tx_data
22a // 22c -> tx_data
050 // 22d MVI T,1000
089 // 22e MOV TX2,T
0f0 // 22f MOV A,VS
042 // 230 MVI T,0001
030 // 231 ADD
04e // 232 MVI T,0111
020 // 233 AND
0d0 // 234 MOV VS,A
307 // 235 CJUMP FLAGS,3,1,tx_wait
200 // 236 -> tx_wait
0ad // 237 MOV T,RADR
08a // 238 MOV ADDRTX,T
3ad // 239 CJUMP NEXT1,2,1,tx_frmr
246 // 23a -> tx_frmr
0b5 // 23b MOV T,NEXT1
084 // 23c MOV CTL1,T
0b6 // 23d MOV T,NEXT2
085 // 23e MOV CTL2,T
050 // 23f MVI T,1000
089 // 240 MOV TX2,T
040 // 241 MVI T,0000
088 // 242 MOV TX1,T
095 // 243 MOV NEXT1,T
307 // 244 CJUMP FLAGS,3,1,tx_wait
200 // 245 -> tx_wait
3af // 246 CJUMP NEXT1,3,1,tx_sabm
267 // 247 -> tx_sabm
0a4 // 248 MOV T,CTL1
08b // 249 MOV FRMR1,T
0a5 // 24a MOV T,CTL2
08c // 24b MOV FRMR2,T
010 // 24c CHANGE
0b0 // 24d MOV T,VS
097 // 24e MOV PST1,T
207 // 24f CCALL FLAGS,3,1,rev3
0b8 // 250 -> rev3
0cd // 251 MOV FRMR3,A
010 // 252 CHANGE
0b1 // 253 MOV T,VR
097 // 254 MOV PST1,T
207 // 255 CCALL FLAGS,3,1,rev3
0b8 // 256 -> rev3
0ce // 257 MOV FRMR4,A
050 // 258 MVI T,1000
08f // 259 MOV FRMR5,T
010 // 25a CHANGE
0b5 // 25b MOV T,NEXT1
084 // 25c MOV CTL1,T
0b6 // 25d MOV T,NEXT2
085 // 25e MOV CTL2,T
050 // 25f MVI T,1000
089 // 260 MOV TX2,T
042 // 261 MVI T,0001
088 // 262 MOV TX1,T
040 // 263 MVI T,0000
095 // 264 MOV NEXT1,T
307 // 265 CJUMP FLAGS,3,1,tx_wait
200 // 266 -> tx_wait
0ac // 267 MOV T,CADR
08a // 268 MOV ADDRTX,T
0b5 // 269 MOV T,NEXT1
084 // 26a MOV CTL1,T
0b6 // 26b MOV T,NEXT2
085 // 26c MOV CTL2,T
050 // 26d MVI T,1000
089 // 26e MOV TX2,T
040 // 26f MVI T,0000
088 // 270 MOV TX1,T
095 // 271 MOV NEXT1,T
09e // 272 MOV T1,T
307 // 273 CJUMP FLAGS,3,1,tx_wait
200 // 274 -> tx_wait
